// pnoc_rom: the 8-PE interconnect embedded in one read-only memory.
//
// The network is a combinational function of 8 PE output bits and 3
// configuration bits, so it fits a single 2048 x 8 ROM (one FPGA block RAM of
// that shape): the address is {cfg, pe_out} and the word read is the vector of
// PE inputs. The table is computed at initialisation from the pattern list in
// pin_pkg: word a holds route(a[10:8], a[7:0]).
//
// Interface: pe_out, cfg in; pe_in out. With PIPELINE = 0 the read is
// asynchronous (a combinational look-up); with PIPELINE = 1 the read is
// registered on clk as in a synchronous block RAM, one cycle of latency.
//
// The single-ROM organisation and its size follow the described design; the
// address bit order and the pipeline option are this design's own choices.
//
// clk is read only when PIPELINE = 1; lint tools report it unused otherwise.
module pnoc_rom #(
  parameter bit PIPELINE = 1'b0
) (
  input  logic                       clk,
  input  logic [pin_pkg::CFG_W-1:0]  cfg,
  input  logic [pin_pkg::N_PE-1:0]   pe_out,
  output logic [pin_pkg::N_PE-1:0]   pe_in
);
  import pin_pkg::*;

  localparam int unsigned AW    = N_PE + CFG_W;  // 11 address bits
  localparam int unsigned DEPTH = 2 ** AW;       // 2048 words

  logic [N_PE-1:0] rom [DEPTH];

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      rom[a] = route(CFG_W'(a >> N_PE), N_PE'(a));
    end
  end

  logic [AW-1:0] addr;
  assign addr = {cfg, pe_out};

  if (PIPELINE) begin : g_reg
    always_ff @(posedge clk) pe_in <= rom[addr];
  end else begin : g_comb
    assign pe_in = rom[addr];
  end

endmodule
