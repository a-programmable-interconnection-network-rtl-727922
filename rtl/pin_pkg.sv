// pin_pkg: shared constants, types and routing functions of the programmable
// interconnect.
//
// The interconnect joins N_PE processing elements (PEs) through one-bit,
// unidirectional links. Each PE drives one output bit into the network and
// receives one input bit from it. A small set of communication patterns is
// supported and nothing else: the pattern in use is chosen by CFG_W common
// configuration bits that every output multiplexer (or every LUT) shares.
//
// Patterns of the 8-PE example network (the numbering of the list is kept as
// the configuration code; code 0 is this design's own "idle" code, under which
// every PE input is 0):
//   1 broadcast from PE 0           in[d] = out[0] for d != 0
//   2 cyclic shift by one           in[(i+1) mod 8] = out[i]
//   3 cyclic shift by two           in[(i+2) mod 8] = out[i]
//   4 skew                          in[7-i] = out[i]
//   5 gather1                       7->6, 5->4, 3->2, 1->0
//   6 gather2                       6->4, 2->0
//   7 gather3                       4->0
// A PE input that a pattern does not drive reads 0.
//
// The bit-masking and shifting (BMS) function is also defined here: the inputs
// x[i] whose mask bit m[i] is set are packed, in index order, into the lowest
// output positions; the other outputs are 0.
package pin_pkg;

  localparam int unsigned N_PE  = 8;  // PEs of the example network
  localparam int unsigned CFG_W = 3;  // configuration bits (7 patterns + idle)

  typedef enum logic [CFG_W-1:0] {
    PAT_IDLE   = 3'd0,
    PAT_BCAST0 = 3'd1,
    PAT_SHIFT1 = 3'd2,
    PAT_SHIFT2 = 3'd3,
    PAT_SKEW   = 3'd4,
    PAT_GATH1  = 3'd5,
    PAT_GATH2  = 3'd6,
    PAT_GATH3  = 3'd7
  } pattern_e;

  // Implementation choices of the interconnect and of the BMS unit.
  typedef enum logic [1:0] {
    NOC_MUX     = 2'd0,  // N multiplexers of P inputs, common control
    NOC_ROM     = 2'd1,  // one 2^(N+CFG_W) x N ROM
    NOC_CASCADE = 2'd2   // cascade of two multi-bit LUTs
  } noc_impl_e;

  typedef enum logic {
    BMS_SINGLE_LUT = 1'b0,
    BMS_CASCADE    = 1'b1
  } bms_impl_e;

  // Source of PE input `dst` under pattern `cfg`. Bit 3 is a valid flag,
  // bits 2:0 the source PE. An invalid result means the input reads 0.
  function automatic logic [3:0] src_of(input logic [CFG_W-1:0] cfg,
                                        input logic [2:0] dst);
    logic [3:0] s;
    s = 4'b0000;
    unique case (pattern_e'(cfg))
      PAT_IDLE:   s = 4'b0000;
      PAT_BCAST0: s = (dst != 3'd0) ? 4'b1000 : 4'b0000;
      PAT_SHIFT1: s = {1'b1, dst - 3'd1};
      PAT_SHIFT2: s = {1'b1, dst - 3'd2};
      PAT_SKEW:   s = {1'b1, 3'd7 - dst};
      PAT_GATH1:  s = (dst[0] == 1'b0) ? {1'b1, dst + 3'd1} : 4'b0000;
      PAT_GATH2:  s = (dst[1:0] == 2'b00) ? {1'b1, dst + 3'd2} : 4'b0000;
      PAT_GATH3:  s = (dst == 3'd0) ? 4'b1100 : 4'b0000;
      default:    s = 4'b0000;
    endcase
    return s;
  endfunction

  // PE inputs produced from PE outputs `pe_out` under pattern `cfg`.
  function automatic logic [N_PE-1:0] route(input logic [CFG_W-1:0] cfg,
                                            input logic [N_PE-1:0] pe_out);
    logic [N_PE-1:0] pe_in;
    logic [3:0]      s;
    for (int d = 0; d < N_PE; d++) begin
      s        = src_of(cfg, 3'(d));
      pe_in[d] = s[3] & pe_out[s[2:0]];
    end
    return pe_in;
  endfunction

  // Bit-masking and shifting of an n-input unit (n <= 8).
  function automatic logic [7:0] bms(input int unsigned n,
                                     input logic [7:0] m,
                                     input logic [7:0] x);
    logic [7:0] y;
    int unsigned k;
    y = '0;
    k = 0;
    for (int i = 0; i < 8; i++) begin
      if (i < n && m[i]) begin
        y[k[2:0]] = x[i];
        k++;
      end
    end
    return y;
  endfunction

endpackage
