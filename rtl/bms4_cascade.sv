// bms4_cascade: the 4-input bit-masking and shifting unit as a two-LUT cascade.
//
// The BMS4 function (see bms_lut) is evaluated in the variable order
// m3, x3, m2, x2, m1, x1, m0, x0: walking from the highest index down, each
// selected data bit is shifted in at the bottom of a growing output vector.
// Cutting this order after m1 leaves only 8 distinct sub-functions, so a
// 3-bit code carries everything the rest needs:
//   LUT1, 32 x 3:  address {m3, x3, m2, x2, m1};
//                  code = {p1, p0, m1}, p = the vector built from m3..m2.
//   LUT2, 64 x 4:  address {code, x1, m0, x0}; word = y[3:0].
// Together 352 bits against 1024 bits for the single 256 x 4 table.
//
// Interface: m, x in; y out. PIPELINE = 0: both reads asynchronous,
// combinational. PIPELINE = 1: each LUT read is registered on clk (x1, m0, x0
// are delayed one cycle to meet the code), two cycles of latency, one result
// per cycle.
//
// The cut, the two LUTs and their address inputs follow the described design;
// the bit assignment of the 3-bit code and the pipeline option are this
// design's own.
//
// clk is read only when PIPELINE = 1; lint tools report it unused otherwise.
module bms4_cascade #(
  parameter bit PIPELINE = 1'b0
) (
  input  logic       clk,
  input  logic [3:0] m,
  input  logic [3:0] x,
  output logic [3:0] y
);

  // LUT1: a = {m3, x3, m2, x2, m1}
  function automatic logic [2:0] stage1(input logic [4:0] a);
    logic [1:0] p;
    p = 2'b00;
    if (a[4]) p = {p[0], a[3]};
    if (a[2]) p = {p[0], a[1]};
    return {p, a[0]};
  endfunction

  // LUT2: a = {code[2:0], x1, m0, x0}
  function automatic logic [3:0] stage2(input logic [5:0] a);
    logic [3:0] v;
    v = {2'b00, a[5:4]};
    if (a[3]) v = {v[2:0], a[2]};
    if (a[1]) v = {v[2:0], a[0]};
    return v;
  endfunction

  logic [2:0] lut1 [32];
  logic [3:0] lut2 [64];

  initial begin
    for (int a = 0; a < 32; a++) lut1[a] = stage1(5'(a));
    for (int a = 0; a < 64; a++) lut2[a] = stage2(6'(a));
  end

  logic [2:0] code;
  logic [2:0] late;  // x1, m0, x0 as seen by LUT2

  if (PIPELINE) begin : g_reg
    always_ff @(posedge clk) begin
      code <= lut1[{m[3], x[3], m[2], x[2], m[1]}];
      late <= {x[1], m[0], x[0]};
      y    <= lut2[{code, late}];
    end
  end else begin : g_comb
    assign code = lut1[{m[3], x[3], m[2], x[2], m[1]}];
    assign late = {x[1], m[0], x[0]};
    assign y    = lut2[{code, late}];
  end

endmodule
