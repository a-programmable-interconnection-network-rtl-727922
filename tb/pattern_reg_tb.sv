// pattern_reg_tb: self-checking testbench of pattern_reg.
//
// After reset the register must hold code 0 with a zero change counter. Then
// random stores (write enable on about half of the cycles, random codes) are
// applied for 2000 cycles; after every clock edge the code and the counter are
// compared with a model kept in the testbench. The code must follow a store on
// the very next edge (one cycle to reprogram the network). A second reset in
// the middle checks that it clears both outputs. A watchdog ends a stalled run.
module pattern_reg_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        rst_n, we;
  logic [2:0]  wdata, cfg;
  logic [15:0] changes;

  pattern_reg #(.CFG_W(3), .CNT_W(16)) dut (
    .clk(clk), .rst_n(rst_n), .we(we), .wdata(wdata), .cfg(cfg), .changes(changes));

  logic [2:0]  m_cfg;
  int          m_changes;

  task automatic check(string what);
    checks++;
    if (cfg !== m_cfg || changes !== 16'(m_changes)) begin
      failures++;
      if (failures < 10)
        $display("%s: cfg=%0d exp %0d, changes=%0d exp %0d", what, cfg, m_cfg, changes, m_changes);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : run
    rst_n = 1'b0; we = 1'b0; wdata = '0;
    m_cfg = '0; m_changes = 0;
    repeat (2) @(negedge clk);
    check("reset");
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      if (t == 1000) begin
        rst_n = 1'b0;
        #1;
        m_cfg = '0; m_changes = 0;
        check("mid reset");
        rst_n = 1'b1;
      end
      we    = $urandom_range(0, 1) == 1;
      wdata = 3'($urandom);
      @(posedge clk);
      if (we) begin
        if (wdata != m_cfg) m_changes++;
        m_cfg = wdata;
      end
      #1;
      check("store");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
