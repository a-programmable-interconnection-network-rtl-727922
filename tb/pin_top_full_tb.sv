// pin_top_full_tb: pin_top with every parameter at its default.
//
// One complete operation of the design: the controlling PE programs each of
// the seven communication patterns in turn (and the idle code), every PE
// sends a 32-bit message bit-serially under each of them, and the words that
// arrive at every PE input are compared with the message of the PE that the
// pattern names as source, or with 0 where the pattern leaves a PE idle. The
// default build is combinational, so bits arrive in the cycle they are sent.
// Then the BMS unit is driven through all 256 mask/data combinations.
module pin_top_full_tb;
  import pin_ref_pkg::*;

  localparam int MSG = 32;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        rst_n, cfg_we;
  logic [2:0]  cfg_wdata, cfg;
  logic [15:0] cfg_changes;
  logic [7:0]  pe_out, pe_in;
  logic [3:0]  bms_m, bms_x, bms_y;

  pin_top dut (
    .clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg_wdata(cfg_wdata), .cfg(cfg),
    .cfg_changes(cfg_changes), .pe_out(pe_out), .pe_in(pe_in), .bms_m(bms_m),
    .bms_x(bms_x), .bms_y(bms_y));

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : run
    logic [MSG-1:0] msg [8];
    logic [MSG-1:0] got [8];
    logic [MSG-1:0] exp;
    logic [7:0]     e;
    int s;
    rst_n = 1'b0; cfg_we = 1'b0; cfg_wdata = '0; pe_out = '0; bms_m = '0; bms_x = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 7; p >= 0; p--) begin
      cfg_we = 1'b1; cfg_wdata = 3'(p);
      @(negedge clk);
      cfg_we = 1'b0;
      checks++;
      if (cfg !== 3'(p)) failures++;
      foreach (msg[i]) msg[i] = MSG'($urandom);
      for (int b = 0; b < MSG; b++) begin
        for (int i = 0; i < 8; i++) pe_out[i] = msg[i][b];
        #1;
        for (int d = 0; d < 8; d++) got[d][b] = pe_in[d];
        @(negedge clk);
      end
      for (int d = 0; d < 8; d++) begin
        s   = ref_src(3'(p), d);
        exp = (s < 0) ? '0 : msg[s];
        checks++;
        if (got[d] !== exp) begin
          failures++;
          $display("pattern %0d PE%0d got %h exp %h", p, d, got[d], exp);
        end
      end
    end
    checks++;
    if (cfg_changes !== 16'd8) failures++;
    for (int a = 0; a < 256; a++) begin
      {bms_m, bms_x} = 8'(a);
      #1;
      e = ref_bms(4, {4'h0, bms_m}, {4'h0, bms_x});
      checks++;
      if (bms_y !== e[3:0]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
