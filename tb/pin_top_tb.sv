// pin_top_tb: end-to-end testbench of pin_top.
//
// Three builds of the top run side by side on the same stimulus:
//   u_def  all defaults: LUT-cascade network and BMS cascade, combinational;
//   u_mux  multiplexer network, single-table BMS, pipelined (latency 1 / 1);
//   u_rom  single-ROM network, BMS cascade, pipelined (latency 1 / 2).
// The run is a sequence of bulk-synchronous communication supersteps. In each,
// the controlling PE stores a pattern code (a random one, every code appearing
// several times, sometimes the code already held), then every PE sends a
// 16-bit message bit-serially, one bit per cycle, LSB first. For each build the
// bits arriving at every PE input are collected with that build's latency and
// the received words are compared with the message of the PE that the pattern
// names as source (or 0). Meanwhile the BMS unit processes a new random
// mask/data pair every cycle. Counted mechanisms: stores of each pattern code,
// stores that left the pattern unchanged, bit streams through a pipelined
// build, and BMS operations with each of the 16 masks; a mechanism that never
// occurs counts as a failure. The change counter of the pattern register is
// also compared with the testbench's own count.
module pin_top_tb;
  import pin_ref_pkg::*;
  import pin_pkg::*;

  localparam int MSG   = 16;   // message length in bits
  localparam int STEPS = 40;   // communication supersteps
  localparam int MAXT  = STEPS * (MSG + 8) + 20;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       rst_n, cfg_we;
  logic [2:0] cfg_wdata;
  logic [7:0] pe_out;
  logic [3:0] bms_m, bms_x;

  logic [2:0]  cfg_d, cfg_m, cfg_r;
  logic [15:0] chg_d, chg_m, chg_r;
  logic [7:0]  in_d, in_m, in_r;
  logic [3:0]  y_d, y_m, y_r;

  pin_top u_def (
    .clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg_wdata(cfg_wdata), .cfg(cfg_d),
    .cfg_changes(chg_d), .pe_out(pe_out), .pe_in(in_d), .bms_m(bms_m), .bms_x(bms_x),
    .bms_y(y_d));
  pin_top #(.NOC_IMPL(NOC_MUX), .BMS_IMPL(BMS_SINGLE_LUT), .PIPELINE(1'b1)) u_mux (
    .clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg_wdata(cfg_wdata), .cfg(cfg_m),
    .cfg_changes(chg_m), .pe_out(pe_out), .pe_in(in_m), .bms_m(bms_m), .bms_x(bms_x),
    .bms_y(y_m));
  pin_top #(.NOC_IMPL(NOC_ROM), .BMS_IMPL(BMS_CASCADE), .PIPELINE(1'b1)) u_rom (
    .clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg_wdata(cfg_wdata), .cfg(cfg_r),
    .cfg_changes(chg_r), .pe_out(pe_out), .pe_in(in_r), .bms_m(bms_m), .bms_x(bms_x),
    .bms_y(y_r));

  // per-cycle records, indexed by cycle number
  logic [7:0] rec_d [MAXT], rec_m [MAXT], rec_r [MAXT];
  logic [7:0] bms_in [MAXT];
  logic [3:0] rec_yd [MAXT], rec_ym [MAXT], rec_yr [MAXT];
  int cyc = 0;

  always @(posedge clk) begin
    // sample what each build shows during the cycle that ends now
    if (cyc < MAXT) begin
      rec_d[cyc]  <= in_d;  rec_m[cyc]  <= in_m;  rec_r[cyc]  <= in_r;
      rec_yd[cyc] <= y_d;   rec_ym[cyc] <= y_m;   rec_yr[cyc] <= y_r;
      bms_in[cyc] <= {bms_m, bms_x};
    end
    cyc <= cyc + 1;
  end

  int n_store [8];
  int n_same = 0, n_stream = 0, n_mask [16];
  int model_changes = 0;
  logic [2:0] model_cfg;

  task automatic fail(string s);
    failures++;
    if (failures < 15) $display("FAIL %s", s);
  endtask

  // receive word of PE d for a build with latency lat, message starting at t0
  function automatic logic [MSG-1:0] rx(int which, int t0, int lat, int d);
    logic [MSG-1:0] w;
    for (int b = 0; b < MSG; b++) begin
      case (which)
        0: w[b] = rec_d[t0 + b + lat][d];
        1: w[b] = rec_m[t0 + b + lat][d];
        default: w[b] = rec_r[t0 + b + lat][d];
      endcase
    end
    return w;
  endfunction

  initial begin : watchdog
    repeat (MAXT + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // BMS stimulus: new random pair every cycle
  always @(negedge clk) begin
    bms_m <= 4'($urandom);
    bms_x <= 4'($urandom);
  end

  initial begin : run
    logic [MSG-1:0] msg [8];
    logic [MSG-1:0] exp, got;
    logic [2:0] code;
    int t0, s;
    foreach (n_store[i]) n_store[i] = 0;
    foreach (n_mask[i]) n_mask[i] = 0;
    rst_n = 1'b0; cfg_we = 1'b0; cfg_wdata = '0; pe_out = '0;
    model_cfg = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int step = 0; step < STEPS; step++) begin
      // the controlling PE programs the next pattern with one store
      @(negedge clk);
      code = (step < 8) ? 3'(step) : (step % 9 == 0) ? model_cfg : 3'($urandom);
      cfg_we = 1'b1; cfg_wdata = code;
      n_store[code]++;
      if (code == model_cfg) n_same++; else model_changes++;
      model_cfg = code;
      @(negedge clk);
      cfg_we = 1'b0;
      checks++;
      if (cfg_d !== code || cfg_m !== code || cfg_r !== code) fail("pattern register");
      // every PE sends a MSG-bit message, LSB first
      foreach (msg[i]) msg[i] = MSG'($urandom);
      t0 = cyc;
      for (int b = 0; b < MSG; b++) begin
        for (int i = 0; i < 8; i++) pe_out[i] = msg[i][b];
        @(negedge clk);
      end
      pe_out = '0;
      repeat (3) @(negedge clk);  // drain the pipelines
      // compare received words
      for (int d = 0; d < 8; d++) begin
        s   = ref_src(code, d);
        exp = (s < 0) ? '0 : msg[s];
        got = rx(0, t0, 0, d);
        checks++;
        if (got !== exp) fail($sformatf("def step %0d pat %0d PE%0d got %h exp %h", step, code, d, got, exp));
        got = rx(1, t0, 1, d);
        checks++;
        if (got !== exp) fail($sformatf("mux step %0d pat %0d PE%0d got %h exp %h", step, code, d, got, exp));
        got = rx(2, t0, 1, d);
        checks++;
        if (got !== exp) fail($sformatf("rom step %0d pat %0d PE%0d got %h exp %h", step, code, d, got, exp));
      end
      n_stream += 2;
    end
    checks++;
    if (chg_d !== 16'(model_changes) || chg_m !== 16'(model_changes) || chg_r !== 16'(model_changes))
      fail($sformatf("change counter %0d exp %0d", chg_d, model_changes));
    // BMS results over the whole run
    for (int t = 4; t < cyc - 1 && t < MAXT; t++) begin
      logic [7:0] e;
      e = ref_bms(4, {4'h0, bms_in[t][7:4]}, {4'h0, bms_in[t][3:0]});
      n_mask[bms_in[t][7:4]]++;
      checks++;
      if (rec_yd[t] !== e[3:0]) fail($sformatf("bms def t=%0d", t));
      checks++;
      if (rec_ym[t+1] !== e[3:0]) fail($sformatf("bms single t=%0d", t));
      if (t + 2 < cyc && t + 2 < MAXT) begin
        checks++;
        if (rec_yr[t+2] !== e[3:0]) fail($sformatf("bms cascade pipe t=%0d", t));
      end
    end
    // every mechanism must have occurred
    for (int p = 0; p < 8; p++) begin
      $display("stores of pattern %0d: %0d", p, n_store[p]);
      checks++;
      if (n_store[p] == 0) fail($sformatf("pattern %0d never stored", p));
    end
    $display("stores that kept the pattern: %0d, pipelined message streams: %0d", n_same, n_stream);
    checks++; if (n_same == 0) fail("no unchanged store");
    checks++; if (n_stream == 0) fail("no pipelined stream");
    for (int k = 0; k < 16; k++) begin
      checks++;
      if (n_mask[k] == 0) fail($sformatf("BMS mask %0d never used", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
