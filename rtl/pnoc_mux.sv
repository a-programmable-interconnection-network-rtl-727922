// pnoc_mux: the 8-PE interconnect built from multiplexers with common control.
//
// Every PE input is fed by one multiplexer with P = 2^CFG_W data inputs. Data
// input p of the multiplexer for PE input d is wired to the output of the PE
// that sends to d under pattern p, or tied to 0 if pattern p leaves d idle.
// All multiplexers share the same select lines, the configuration code, so
// there are no arbiters and no per-output control: only CFG_W control bits
// instead of the N*log2(N) of a multiplexer crossbar.
//
// Interface: pe_out (one bit per PE, into the network), cfg (pattern code),
// pe_in (one bit per PE, out of the network). With PIPELINE = 0 the network is
// purely combinational; with PIPELINE = 1 its outputs are registered on clk,
// one cycle of latency, so a bit-serial message streams through at one bit per
// cycle. The wiring of the data inputs comes from pin_pkg::src_of.
//
// One multiplexer per output with shared control is the structure the design
// describes; the optional output register is this design's own choice.
//
// clk is read only when PIPELINE = 1; lint tools report it unused otherwise.
module pnoc_mux #(
  parameter bit PIPELINE = 1'b0
) (
  input  logic                       clk,
  input  logic [pin_pkg::CFG_W-1:0]  cfg,
  input  logic [pin_pkg::N_PE-1:0]   pe_out,
  output logic [pin_pkg::N_PE-1:0]   pe_in
);
  import pin_pkg::*;

  localparam int unsigned P = 2 ** CFG_W;

  logic [N_PE-1:0] sw_out;

  for (genvar d = 0; d < N_PE; d++) begin : g_dst
    logic [P-1:0] mux_in;
    for (genvar p = 0; p < P; p++) begin : g_pat
      localparam logic [3:0] SRC = src_of(CFG_W'(p), 3'(d));
      if (SRC[3]) begin : g_wire
        assign mux_in[p] = pe_out[SRC[2:0]];
      end else begin : g_zero
        assign mux_in[p] = 1'b0;
      end
    end
    assign sw_out[d] = mux_in[cfg];
  end

  if (PIPELINE) begin : g_reg
    always_ff @(posedge clk) pe_in <= sw_out;
  end else begin : g_comb
    assign pe_in = sw_out;
  end

endmodule
