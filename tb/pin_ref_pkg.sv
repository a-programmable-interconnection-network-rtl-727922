// pin_ref_pkg: reference models used by the testbenches, written apart from the
// RTL's own tables. ref_route spells every communication pattern out as the
// source-to-destination pairs of its definition; ref_bms finds, for each output
// position k, the k-th selected data bit.
package pin_ref_pkg;

  function automatic logic [7:0] ref_route(input logic [2:0] cfg,
                                           input logic [7:0] o);
    logic [7:0] r;
    r = 8'h00;
    case (cfg)
      3'd1: for (int d = 1; d < 8; d++) r[d] = o[0];                // broadcast from 0
      3'd2: for (int i = 0; i < 8; i++) r[(i + 1) % 8] = o[i];      // shift by 1
      3'd3: for (int i = 0; i < 8; i++) r[(i + 2) % 8] = o[i];      // shift by 2
      3'd4: for (int i = 0; i < 8; i++) r[7 - i] = o[i];            // skew
      3'd5: begin r[6] = o[7]; r[4] = o[5]; r[2] = o[3]; r[0] = o[1]; end
      3'd6: begin r[4] = o[6]; r[0] = o[2]; end
      3'd7: r[0] = o[4];
      default: r = 8'h00;                                           // idle
    endcase
    return r;
  endfunction

  // Source PE feeding destination d under cfg, or -1 when d is not driven.
  function automatic int ref_src(input logic [2:0] cfg, input int d);
    logic [7:0] r;
    for (int s = 0; s < 8; s++) begin
      r = ref_route(cfg, 8'(1 << s));
      if (r[d]) return s;
    end
    return -1;
  endfunction

  function automatic logic [7:0] ref_bms(input int n, input logic [7:0] m,
                                         input logic [7:0] x);
    logic [7:0] y;
    int seen;
    y = 8'h00;
    for (int k = 0; k < n; k++) begin
      seen = 0;
      for (int i = 0; i < n; i++) begin
        if (m[i]) begin
          if (seen == k) y[k] = x[i];
          seen++;
        end
      end
    end
    return y;
  endfunction

endpackage
