// bms_lut_tb: self-checking testbench of bms_lut.
//
// Units of 4, 6, 7 and 8 inputs (the sizes BMS4 to BMS8) are built as single
// tables and checked exhaustively against the reference BMS function: 256,
// 4096, 16384 and 65536 combinations. A pipelined BMS4 copy gets a new random
// input every cycle and must return each result exactly one cycle later.
module bms_lut_tb;
  import pin_ref_pkg::*;

  localparam int STREAM = 2000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [7:0] m, x;
  logic [3:0] y4, y4p;
  logic [5:0] y6;
  logic [6:0] y7;
  logic [7:0] y8, e;
  logic [7:0] stim [STREAM];

  bms_lut #(.N(4))                  dut4  (.clk(clk), .m(m[3:0]), .x(x[3:0]), .y(y4));
  bms_lut #(.N(4), .PIPELINE(1'b1)) dut4p (.clk(clk), .m(m[3:0]), .x(x[3:0]), .y(y4p));
  bms_lut #(.N(6))                  dut6  (.clk(clk), .m(m[5:0]), .x(x[5:0]), .y(y6));
  bms_lut #(.N(7))                  dut7  (.clk(clk), .m(m[6:0]), .x(x[6:0]), .y(y7));
  bms_lut #(.N(8))                  dut8  (.clk(clk), .m(m),      .x(x),      .y(y8));

  task automatic cmp(int n, logic [7:0] got);
    logic [7:0] mm, xx, exp;
    mm  = m & 8'((1 << n) - 1);
    xx  = x & 8'((1 << n) - 1);
    exp = ref_bms(n, mm, xx);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("BMS%0d m=%b x=%b y=%b exp %b", n, mm, xx, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : run
    m = '0; x = '0;
    for (int a = 0; a < 65536; a++) begin
      m = 8'(a >> 8);
      x = 8'(a);
      #1;
      cmp(8, y8);
      if (m[7] == 1'b0 && x[7] == 1'b0) cmp(7, {1'b0, y7});
      if (m[7:6] == 2'b00 && x[7:6] == 2'b00) cmp(6, {2'b00, y6});
      if (m[7:4] == 4'h0 && x[7:4] == 4'h0) cmp(4, {4'h0, y4});
    end
    m = '0; x = '0;
    for (int t = 0; t < STREAM; t++) stim[t] = 8'($urandom);
    for (int t = 0; t < STREAM + 1; t++) begin
      @(negedge clk);
      if (t >= 1) begin
        e = ref_bms(4, {4'h0, stim[t-1][7:4]}, {4'h0, stim[t-1][3:0]});
        checks++;
        if (y4p !== e[3:0]) begin
          failures++;
          if (failures < 10) $display("pipe t=%0d y=%b exp %b", t, y4p, e[3:0]);
        end
      end
      if (t < STREAM) {m[3:0], x[3:0]} = stim[t];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
