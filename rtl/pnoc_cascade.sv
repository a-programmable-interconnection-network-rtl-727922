// pnoc_cascade: the 8-PE interconnect as a cascade of two multi-bit LUTs.
//
// The 2048 x 8 single-ROM network is split into two smaller memories:
//   LUT1, 512 x 8:  address {cfg[2:0], out0, out6, out2, out5, out4, out3}
//   LUT2, 1024 x 8: address {mid[7:0], out1, out7}, word = the 8 PE inputs
// (12 Kbit in all instead of 16 Kbit). The 8-bit intermediate code `mid` names
// one of the distinct sub-functions left once the configuration and six of the
// PE outputs are known. This design encodes it as follows:
//   mid[7:6] = 01 / 10 / 11: shift by one / shift by two / skew;
//              mid[5:0] = {out0, out6, out2, out5, out4, out3} unchanged.
//   mid[7:6] = 00: any other pattern; mid[5:3] = its configuration code and
//              mid[1:0] the at most two of those six outputs it still needs
//              (broadcast: out0; gather1: out5, out3; gather2: out6, out2;
//              gather3: out4); mid[2] = 0.
// 205 of the 256 codes are used. Both tables are computed at initialisation;
// LUT2 rebuilds the PE-output vector from mid, out1 and out7 and applies
// pin_pkg::route, so the cascade reproduces the single ROM exactly.
//
// Interface: pe_out, cfg in; pe_in out. PIPELINE = 0: both look-ups are
// asynchronous and the cascade is combinational. PIPELINE = 1: each LUT read is
// registered on clk (out1 and out7 are delayed one cycle to meet mid), so the
// latency is two cycles and a bit-serial message still streams at one bit per
// cycle.
//
// The two-LUT split, its memory shapes and which PE outputs address which LUT
// follow the described design; the intermediate encoding and the pipeline
// option are this design's own.
//
// clk is read only when PIPELINE = 1; lint tools report it unused otherwise.
module pnoc_cascade #(
  parameter bit PIPELINE = 1'b0
) (
  input  logic                       clk,
  input  logic [pin_pkg::CFG_W-1:0]  cfg,
  input  logic [pin_pkg::N_PE-1:0]   pe_out,
  output logic [pin_pkg::N_PE-1:0]   pe_in
);
  import pin_pkg::*;

  localparam int unsigned A1 = CFG_W + 6;  // 9 address bits
  localparam int unsigned A2 = 8 + 2;      // 10 address bits

  // LUT1 contents: a = {cfg, d6}, d6 = {out0, out6, out2, out5, out4, out3}.
  function automatic logic [7:0] mid_encode(input logic [A1-1:0] a);
    logic [CFG_W-1:0] c;
    logic [5:0]       d6;
    logic [1:0]       dd;
    c  = a[A1-1:6];
    d6 = a[5:0];
    dd = 2'b00;
    unique case (pattern_e'(c))
      PAT_SHIFT1: return {2'b01, d6};
      PAT_SHIFT2: return {2'b10, d6};
      PAT_SKEW:   return {2'b11, d6};
      PAT_BCAST0: dd = {1'b0, d6[5]};
      PAT_GATH1:  dd = {d6[2], d6[0]};
      PAT_GATH2:  dd = {d6[4], d6[3]};
      PAT_GATH3:  dd = {1'b0, d6[1]};
      default:    dd = 2'b00;
    endcase
    return {2'b00, c, 1'b0, dd};
  endfunction

  // LUT2 contents: a = {mid, out1, out7}.
  function automatic logic [N_PE-1:0] mid_decode(input logic [A2-1:0] a);
    logic [7:0]       mid;
    logic [N_PE-1:0]  v;
    logic [CFG_W-1:0] c;
    mid  = a[A2-1:2];
    v    = '0;
    v[1] = a[1];
    v[7] = a[0];
    if (mid[7:6] != 2'b00) begin
      c = (mid[7:6] == 2'b01) ? PAT_SHIFT1 :
          (mid[7:6] == 2'b10) ? PAT_SHIFT2 : PAT_SKEW;
      {v[0], v[6], v[2], v[5], v[4], v[3]} = mid[5:0];
    end else begin
      c = mid[5:3];
      unique case (pattern_e'(c))
        PAT_BCAST0: v[0] = mid[0];
        PAT_GATH1:  {v[5], v[3]} = mid[1:0];
        PAT_GATH2:  {v[6], v[2]} = mid[1:0];
        PAT_GATH3:  v[4] = mid[0];
        default:    ;
      endcase
    end
    return route(c, v);
  endfunction

  logic [7:0]      lut1 [2 ** A1];
  logic [N_PE-1:0] lut2 [2 ** A2];

  initial begin
    for (int a = 0; a < 2 ** A1; a++) lut1[a] = mid_encode(A1'(a));
    for (int a = 0; a < 2 ** A2; a++) lut2[a] = mid_decode(A2'(a));
  end

  logic [A1-1:0] addr1;
  logic [7:0]    mid;
  logic [1:0]    late;   // out1, out7 as seen by LUT2
  logic [A2-1:0] addr2;

  assign addr1 = {cfg, pe_out[0], pe_out[6], pe_out[2], pe_out[5], pe_out[4], pe_out[3]};
  assign addr2 = {mid, late};

  if (PIPELINE) begin : g_reg
    always_ff @(posedge clk) begin
      mid   <= lut1[addr1];
      late  <= {pe_out[1], pe_out[7]};
      pe_in <= lut2[addr2];
    end
  end else begin : g_comb
    assign mid   = lut1[addr1];
    assign late  = {pe_out[1], pe_out[7]};
    assign pe_in = lut2[addr2];
  end

endmodule
