// pin_top: a run-time programmable interconnect for 8 processing elements with
// 7 communication patterns, and beside it a 4-input bit-masking and shifting
// unit; the two are independent and have their own ports.
//
// Interconnect: the controlling PE stores a pattern code into the pattern
// register (cfg_we, cfg_wdata); from the next clock edge every PE output bit
// pe_out[i] reaches the PE inputs pe_in[] that the pattern names, with no
// arbitration and no contention. NOC_IMPL selects how the network is built:
// multiplexers with common control (NOC_MUX), one 2048 x 8 ROM (NOC_ROM) or a
// cascade of a 512 x 8 and a 1024 x 8 LUT (NOC_CASCADE, the default).
//
// BMS unit: bms_y = the bits of bms_x selected by bms_m, packed to the bottom.
// BMS_IMPL selects a single 256 x 4 table or the two-LUT cascade (default).
//
// PIPELINE = 0 (default): both datapaths are combinational. PIPELINE = 1: every
// LUT read (or the multiplexer output) is registered, so the latency is one
// cycle per LUT stage (interconnect: MUX 1, ROM 1, CASCADE 2; BMS: single 1,
// cascade 2) while one bit per PE per cycle still passes. cfg_changes counts
// pattern changes since reset.
//
// Which implementations are defaults and the pipeline option are this design's
// choices; the structures themselves follow the described design.
module pin_top #(
  parameter pin_pkg::noc_impl_e NOC_IMPL = pin_pkg::NOC_CASCADE,
  parameter pin_pkg::bms_impl_e BMS_IMPL = pin_pkg::BMS_CASCADE,
  parameter bit                 PIPELINE = 1'b0
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // pattern programming by the controlling PE
  input  logic                       cfg_we,
  input  logic [pin_pkg::CFG_W-1:0]  cfg_wdata,
  output logic [pin_pkg::CFG_W-1:0]  cfg,
  output logic [15:0]                cfg_changes,
  // one-bit links of the PEs
  input  logic [pin_pkg::N_PE-1:0]   pe_out,
  output logic [pin_pkg::N_PE-1:0]   pe_in,
  // bit-masking and shifting unit
  input  logic [3:0]                 bms_m,
  input  logic [3:0]                 bms_x,
  output logic [3:0]                 bms_y
);

  pattern_reg #(.CNT_W(16)) u_pattern (
    .clk    (clk),
    .rst_n  (rst_n),
    .we     (cfg_we),
    .wdata  (cfg_wdata),
    .cfg    (cfg),
    .changes(cfg_changes)
  );

  if (NOC_IMPL == pin_pkg::NOC_MUX) begin : g_noc_mux
    pnoc_mux #(.PIPELINE(PIPELINE)) u_noc (
      .clk(clk), .cfg(cfg), .pe_out(pe_out), .pe_in(pe_in));
  end else if (NOC_IMPL == pin_pkg::NOC_ROM) begin : g_noc_rom
    pnoc_rom #(.PIPELINE(PIPELINE)) u_noc (
      .clk(clk), .cfg(cfg), .pe_out(pe_out), .pe_in(pe_in));
  end else begin : g_noc_cascade
    pnoc_cascade #(.PIPELINE(PIPELINE)) u_noc (
      .clk(clk), .cfg(cfg), .pe_out(pe_out), .pe_in(pe_in));
  end

  if (BMS_IMPL == pin_pkg::BMS_SINGLE_LUT) begin : g_bms_lut
    bms_lut #(.N(4), .PIPELINE(PIPELINE)) u_bms (
      .clk(clk), .m(bms_m), .x(bms_x), .y(bms_y));
  end else begin : g_bms_cascade
    bms4_cascade #(.PIPELINE(PIPELINE)) u_bms (
      .clk(clk), .m(bms_m), .x(bms_x), .y(bms_y));
  end

endmodule
