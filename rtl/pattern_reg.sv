// pattern_reg: the pattern holding register of the programmable interconnect.
//
// Reprogramming the network takes a single store: the controlling PE writes the
// configuration code of the next communication pattern into this register, and
// its output drives the common select inputs of every switch of the network.
// The written code is visible on `cfg` from the clock edge that takes the store;
// the network changes pattern in that same cycle. A reset clears the register to
// code 0, which this design uses as "idle" (no PE input driven).
//
// Interface: clk, rst_n (asynchronous, active low), we/wdata (the store from the
// controlling PE), cfg (current pattern code). `changes` counts accepted stores
// that changed the pattern, as a visible measure of reconfigurations.
//
// The register and its single-store programming follow the described design;
// the reset value, the asynchronous reset and the reconfiguration counter are
// this design's own choices.
module pattern_reg #(
  parameter int unsigned CFG_W = pin_pkg::CFG_W,
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [CFG_W-1:0] wdata,
  output logic [CFG_W-1:0] cfg,
  output logic [CNT_W-1:0] changes
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg     <= '0;
      changes <= '0;
    end else if (we) begin
      cfg <= wdata;
      if (wdata != cfg) changes <= changes + 1'b1;
    end
  end

endmodule
