// bms4_cascade_tb: self-checking testbench of bms4_cascade.
//
// The combinational copy (PIPELINE = 0) is checked against the reference BMS
// function for all 256 mask/data combinations, including every example row of
// the unit's cube list such as m=1111, x=1101 -> y=1101 and m=1000, x=1000 ->
// y=0001. The pipelined copy (PIPELINE = 1) gets a new random mask and data
// word every cycle and must return each result exactly two cycles later.
module bms4_cascade_tb;
  import pin_ref_pkg::*;

  localparam int LAT    = 2;
  localparam int STREAM = 2000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [3:0] m, x, y_comb, y_pipe;
  logic [7:0] stim [STREAM];
  logic [7:0] e;

  bms4_cascade #(.PIPELINE(1'b0)) dut_comb (.clk(clk), .m(m), .x(x), .y(y_comb));
  bms4_cascade #(.PIPELINE(1'b1)) dut_pipe (.clk(clk), .m(m), .x(x), .y(y_pipe));

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : run
    m = '0; x = '0;
    for (int a = 0; a < 256; a++) begin
      {m, x} = 8'(a);
      #1;
      e = ref_bms(4, 8'(m), 8'(x));
      checks++;
      if (y_comb !== e[3:0]) begin
        failures++;
        if (failures < 10) $display("comb m=%b x=%b y=%b exp %b", m, x, y_comb, e[3:0]);
      end
    end
    // two hand-worked cases
    m = 4'b0101; x = 4'b1010; #1; checks++; if (y_comb !== 4'b0000) failures++;
    m = 4'b1010; x = 4'b1010; #1; checks++; if (y_comb !== 4'b0011) failures++;
    for (int t = 0; t < STREAM; t++) stim[t] = 8'($urandom);
    for (int t = 0; t < STREAM + LAT; t++) begin
      @(negedge clk);
      if (t >= LAT) begin
        e = ref_bms(4, {4'h0, stim[t-LAT][7:4]}, {4'h0, stim[t-LAT][3:0]});
        checks++;
        if (y_pipe !== e[3:0]) begin
          failures++;
          if (failures < 10) $display("pipe t=%0d y=%b exp %b", t, y_pipe, e[3:0]);
        end
      end
      if (t < STREAM) {m, x} = stim[t];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
