// pnoc_cascade_tb: self-checking testbench of pnoc_cascade.
//
// Two copies of the network are tested: combinational (PIPELINE = 0) and
// pipelined (PIPELINE = 1). The combinational copy is driven through all 2048
// combinations of pattern code and PE outputs and compared with the reference
// routing. The pipelined copy gets a random bit stream with a new pattern code
// and new PE outputs every cycle; each result must match the reference for the
// input applied exactly 2 cycle(s) earlier, which checks both the function
// and the latency at one result per cycle. A watchdog ends the run if it stalls.
module pnoc_cascade_tb;
  import pin_ref_pkg::*;

  localparam int LAT    = 2;
  localparam int STREAM = 4000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [2:0] cfg;
  logic [7:0] pe_out, in_comb, in_pipe;

  pnoc_cascade #(.PIPELINE(1'b0)) dut_comb (.clk(clk), .cfg(cfg), .pe_out(pe_out), .pe_in(in_comb));
  pnoc_cascade #(.PIPELINE(1'b1)) dut_pipe (.clk(clk), .cfg(cfg), .pe_out(pe_out), .pe_in(in_pipe));

  logic [10:0] stim [STREAM];

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : run
    logic [7:0] exp;
    cfg    = '0;
    pe_out = '0;
    // exhaustive, combinational copy
    for (int a = 0; a < 2048; a++) begin
      {cfg, pe_out} = 11'(a);
      #1;
      exp = ref_route(cfg, pe_out);
      checks++;
      if (in_comb !== exp) begin
        failures++;
        if (failures < 10)
          $display("comb mismatch cfg=%0d out=%b got=%b exp=%b", cfg, pe_out, in_comb, exp);
      end
    end
    // random stream, pipelined copy
    for (int t = 0; t < STREAM; t++) stim[t] = 11'($urandom);
    for (int t = 0; t < STREAM + LAT; t++) begin
      @(negedge clk);
      if (t >= LAT) begin
        exp = ref_route(stim[t-LAT][10:8], stim[t-LAT][7:0]);
        checks++;
        if (in_pipe !== exp) begin
          failures++;
          if (failures < 10)
            $display("pipe mismatch t=%0d got=%b exp=%b", t, in_pipe, exp);
        end
      end
      if (t < STREAM) {cfg, pe_out} = stim[t];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
