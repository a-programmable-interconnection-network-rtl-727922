// bms_lut: an N-input bit-masking and shifting (BMS) unit in one look-up table.
//
// A BMS unit takes an N-bit mask m and N data bits x. The data bits whose mask
// bit is set are moved, keeping their order, to the lowest output positions;
// the remaining outputs are 0. For N = 4: m = 0101, x = abcd (x3..x0) gives
// y = 00bd. Used as an offset into a multi-way dispatch table of a
// micro-programmed controller, it lets tables of different sizes be packed
// tightly into control memory.
//
// The unit is stored as a single 2^(2N) x N table addressed by {m, x}
// (256 x 4 for N = 4), computed at initialisation from pin_pkg::bms.
// Interface: m, x in; y out. PIPELINE = 0: asynchronous read, combinational;
// PIPELINE = 1: registered read on clk, one cycle of latency.
//
// The function, the single-table organisation and its size follow the
// described design; the address bit order and the pipeline option are this
// design's own. N may be 1 to 8.
//
// clk is read only when PIPELINE = 1; lint tools report it unused otherwise.
module bms_lut #(
  parameter int unsigned N        = 4,
  parameter bit          PIPELINE = 1'b0
) (
  input  logic         clk,
  input  logic [N-1:0] m,
  input  logic [N-1:0] x,
  output logic [N-1:0] y
);

  localparam int unsigned AW = 2 * N;

  logic [N-1:0] lut [2 ** AW];

  initial begin
    logic [7:0] mm, xx;
    for (int a = 0; a < 2 ** AW; a++) begin
      mm = 8'((a >> N) & ((1 << N) - 1));
      xx = 8'(a & ((1 << N) - 1));
      lut[a] = N'(pin_pkg::bms(N, mm, xx));
    end
  end

  logic [AW-1:0] addr;
  assign addr = {m, x};

  if (PIPELINE) begin : g_reg
    always_ff @(posedge clk) y <= lut[addr];
  end else begin : g_comb
    assign y = lut[addr];
  end

endmodule
