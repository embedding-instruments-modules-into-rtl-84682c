// teds_controller: the TIM's Transducer Electronic Data Sheets (TEDSs).
//
// Three byte-addressed TEDS images of TEDS_BYTES octets each, selected by
// their IEEE1451.0 access code: 0x01 Meta-TEDS, 0x03 TC-TEDS and 0x80 the
// manufacturer-defined TEDS (MD-TEDS) of the step-motor channel. Every TEDS
// image is laid out as the standard has it: a 4-octet length (the number of
// octets that follow, checksum included), type/length/value fields, and a
// 2-octet checksum. After reset the MD-TEDS holds the step-motor defaults:
//   field 3 identification 00 80 01 01, field 4 direction 01,
//   field 5 number of steps FF FF (continuous), field 6 step mode 00 (half),
//   field 7 time divider 01 86 A0 (100000); length 0x17, checksum 0xFC1D.
// The checksum is computed here as 0x10000 minus the 16-bit sum of all
// preceding octets, which reproduces the 0xFC1D of that table. The Meta-TEDS
// and TC-TEDS contents are not specified for this design; they reset to an
// empty TEDS (length 2, checksum only) and can be written by the NCAP.
//
// Reads are combinational (rdata follows sel/addr in the same cycle), writes
// take effect at the clock edge with we high. `sel_ok` tells whether sel is a
// known code; addresses at or above TEDS_BYTES read 0 and are not written.
module teds_controller
  import ieee1451_pkg::*;
#(
  parameter int unsigned TEDS_BYTES = 64
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] sel,
  input  logic [7:0] addr,
  input  logic       we,
  input  logic [7:0] wdata,
  output logic [7:0] rdata,
  output logic       sel_ok
);
  localparam int unsigned MD_LEN = 27;
  typedef logic [7:0] byte_arr_t [TEDS_BYTES];

  // Step-motor MD-TEDS body: length, fields 3..7 (type, length, value).
  localparam logic [7:0] MD_BODY [MD_LEN-2] = '{
    8'h00, 8'h00, 8'h00, 8'h17,
    8'h03, 8'h04, 8'h00, 8'h80, 8'h01, 8'h01,
    8'h04, 8'h01, 8'h01,
    8'h05, 8'h02, 8'hFF, 8'hFF,
    8'h06, 8'h01, 8'h00,
    8'h07, 8'h03, 8'h01, 8'h86, 8'hA0
  };

  function automatic byte_arr_t md_default();
    byte_arr_t   m;
    logic [15:0] sum;
    sum = '0;
    for (int i = 0; i < TEDS_BYTES; i++) m[i] = 8'h00;
    for (int i = 0; i < MD_LEN - 2; i++) begin
      m[i] = MD_BODY[i];
      sum  = sum + 16'(MD_BODY[i]);
    end
    sum = 16'h0000 - sum;
    m[MD_LEN-2] = sum[15:8];
    m[MD_LEN-1] = sum[7:0];
    return m;
  endfunction

  function automatic byte_arr_t empty_default();
    byte_arr_t m;
    for (int i = 0; i < TEDS_BYTES; i++) m[i] = 8'h00;
    m[3] = 8'h02;                       // length: checksum only
    m[4] = 8'hFF; m[5] = 8'hFE;         // 0x10000 - 0x0002
    return m;
  endfunction

  localparam byte_arr_t MD_INIT    = md_default();
  localparam byte_arr_t EMPTY_INIT = empty_default();

  byte_arr_t meta_teds, tc_teds, md_teds;

  wire in_range = (32'(addr) < TEDS_BYTES);
  wire [$clog2(TEDS_BYTES)-1:0] a = addr[$clog2(TEDS_BYTES)-1:0];

  always_comb begin
    sel_ok = (sel == TEDS_META) || (sel == TEDS_TC) || (sel == TEDS_MD);
    rdata  = 8'h00;
    if (in_range) begin
      unique case (sel)
        TEDS_META: rdata = meta_teds[a];
        TEDS_TC:   rdata = tc_teds[a];
        TEDS_MD:   rdata = md_teds[a];
        default:   rdata = 8'h00;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta_teds <= EMPTY_INIT;
      tc_teds   <= EMPTY_INIT;
      md_teds   <= MD_INIT;
    end else if (we && in_range) begin
      unique case (sel)
        TEDS_META: meta_teds[a] <= wdata;
        TEDS_TC:   tc_teds[a]   <= wdata;
        TEDS_MD:   md_teds[a]   <= wdata;
        default: ;
      endcase
    end
  end

  initial assert (TEDS_BYTES >= MD_LEN && TEDS_BYTES <= 256)
    else $error("TEDS_BYTES must hold the %0d-octet MD-TEDS and fit 8-bit addresses", MD_LEN);
endmodule
