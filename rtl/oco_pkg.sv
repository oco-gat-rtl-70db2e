// oco_pkg: number formats, sizes and arithmetic helpers shared by the OCO-GAT datapath.
//
// All data is fixed point (a design choice; the source gives no number format):
//   data_t  : signed 16-bit, 8 fraction bits (Q7.8). Node features, weights, attention kernels,
//             h', p, q, e and the output embeddings z all use it.
//   coef_t  : unsigned 24-bit, 12 fraction bits (Q12.12). The exponentiated attention
//             coefficient e' = exp(e); it saturates at 4096 - 2^-12 (e > ~8.3) and underflows
//             to zero below about e = -8.3.
//   acc_t   : signed 40-bit, 12 fraction bits. Partial sums of e' and of e'*h'.
// exp(x) is computed as 2^(x*log2(e)): the integer part of the exponent is a shift, the
// fraction is looked up in a 64-entry table of 2^(k/64) (Q1.16) and linearly interpolated.
// The table entries are round(2^(k/64) * 65536), k = 0..64.
// The helpers are split into the pieces the pipelined exp of the Computing PE registers
// between (exp_scale, exp_mant, exp_shift); exp_fixed chains them for the ELU of the Sync PE.
package oco_pkg;

  localparam int unsigned DATA_W  = 16;
  localparam int unsigned FRAC    = 8;
  localparam int unsigned COEF_W  = 24;
  localparam int unsigned CFRAC   = 12;
  localparam int unsigned ACC_W   = 40;

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic        [COEF_W-1:0] coef_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // log2(e) in Q2.14
  localparam logic signed [16:0] LOG2E_Q14 = 17'sd23637;
  // LeakyReLU negative slope 0.2 in Q0.8 (51/256)
  localparam logic signed [9:0]  LRELU_SLOPE = 10'sd51;

  // Saturate a wide signed value to data_t.
  function automatic data_t sat_data(input logic signed [63:0] v);
    if (v > 64'sd32767)       return 16'sh7fff;
    else if (v < -64'sd32768) return 16'sh8000;
    else                      return data_t'(v);
  endfunction

  function automatic data_t leaky_relu(input data_t x);
    logic signed [25:0] m;
    if (!x[DATA_W-1]) return x;
    m = x * LRELU_SLOPE;
    return data_t'(m >>> 8);
  endfunction

  // 2^(k/64) in Q1.16, k = 0..64
  function automatic logic [17:0] exp2_lut(input logic [6:0] k);
    if (k[6]) return 18'd131072;
    case (k[5:0])
      6'd0: exp2_lut = 18'd65536;
      6'd1: exp2_lut = 18'd66250;
      6'd2: exp2_lut = 18'd66971;
      6'd3: exp2_lut = 18'd67700;
      6'd4: exp2_lut = 18'd68438;
      6'd5: exp2_lut = 18'd69183;
      6'd6: exp2_lut = 18'd69936;
      6'd7: exp2_lut = 18'd70698;
      6'd8: exp2_lut = 18'd71468;
      6'd9: exp2_lut = 18'd72246;
      6'd10: exp2_lut = 18'd73032;
      6'd11: exp2_lut = 18'd73828;
      6'd12: exp2_lut = 18'd74632;
      6'd13: exp2_lut = 18'd75444;
      6'd14: exp2_lut = 18'd76266;
      6'd15: exp2_lut = 18'd77096;
      6'd16: exp2_lut = 18'd77936;
      6'd17: exp2_lut = 18'd78785;
      6'd18: exp2_lut = 18'd79642;
      6'd19: exp2_lut = 18'd80510;
      6'd20: exp2_lut = 18'd81386;
      6'd21: exp2_lut = 18'd82273;
      6'd22: exp2_lut = 18'd83169;
      6'd23: exp2_lut = 18'd84074;
      6'd24: exp2_lut = 18'd84990;
      6'd25: exp2_lut = 18'd85915;
      6'd26: exp2_lut = 18'd86851;
      6'd27: exp2_lut = 18'd87796;
      6'd28: exp2_lut = 18'd88752;
      6'd29: exp2_lut = 18'd89719;
      6'd30: exp2_lut = 18'd90696;
      6'd31: exp2_lut = 18'd91684;
      6'd32: exp2_lut = 18'd92682;
      6'd33: exp2_lut = 18'd93691;
      6'd34: exp2_lut = 18'd94711;
      6'd35: exp2_lut = 18'd95743;
      6'd36: exp2_lut = 18'd96785;
      6'd37: exp2_lut = 18'd97839;
      6'd38: exp2_lut = 18'd98905;
      6'd39: exp2_lut = 18'd99982;
      6'd40: exp2_lut = 18'd101070;
      6'd41: exp2_lut = 18'd102171;
      6'd42: exp2_lut = 18'd103283;
      6'd43: exp2_lut = 18'd104408;
      6'd44: exp2_lut = 18'd105545;
      6'd45: exp2_lut = 18'd106694;
      6'd46: exp2_lut = 18'd107856;
      6'd47: exp2_lut = 18'd109031;
      6'd48: exp2_lut = 18'd110218;
      6'd49: exp2_lut = 18'd111418;
      6'd50: exp2_lut = 18'd112631;
      6'd51: exp2_lut = 18'd113858;
      6'd52: exp2_lut = 18'd115098;
      6'd53: exp2_lut = 18'd116351;
      6'd54: exp2_lut = 18'd117618;
      6'd55: exp2_lut = 18'd118899;
      6'd56: exp2_lut = 18'd120194;
      6'd57: exp2_lut = 18'd121502;
      6'd58: exp2_lut = 18'd122825;
      6'd59: exp2_lut = 18'd124163;
      6'd60: exp2_lut = 18'd125515;
      6'd61: exp2_lut = 18'd126882;
      6'd62: exp2_lut = 18'd128263;
      6'd63: exp2_lut = 18'd129660;
      default: exp2_lut = 18'd65536;
    endcase
  endfunction

  // Stage A: x (Q7.8) * log2(e) (Q2.14) -> exponent t with 22 fraction bits.
  function automatic logic signed [33:0] exp_scale(input data_t x);
    return x * LOG2E_Q14;
  endfunction

  // Stage B: mantissa 2^frac(t) in Q1.16 by table lookup and linear interpolation.
  function automatic logic [17:0] exp_mant(input logic [21:0] f);
    logic [17:0] b, n;
    logic [25:0] d;
    b = exp2_lut({1'b0, f[21:16]});
    n = exp2_lut({1'b0, f[21:16]} + 7'd1);
    d = 26'(n - b) * 26'(f[15:8]);
    return b + 18'(d >> 8);
  endfunction

  // Stage C: apply the integer exponent n = floor(t); result Q12.12, saturating.
  function automatic coef_t exp_shift(input logic [17:0] m, input logic signed [11:0] n);
    logic [47:0] w;
    if (n >= 12'sd12) return '1;
    if (n >= 12'sd4) begin
      w = {30'd0, m} << (n - 12'sd4);
      return (w > 48'hff_ffff) ? coef_t'('1) : coef_t'(w);
    end
    if (n <= -12'sd20) return '0;
    return coef_t'({30'd0, m} >> (12'sd4 - n));
  endfunction

  function automatic coef_t exp_fixed(input data_t x);
    logic signed [33:0] t;
    t = exp_scale(x);
    return exp_shift(exp_mant(t[21:0]), 12'(t >>> 22));
  endfunction

  // ELU(x) = x for x >= 0, exp(x) - 1 otherwise; Q7.8 in and out.
  function automatic data_t elu(input data_t x);
    coef_t e;
    if (!x[DATA_W-1]) return x;
    e = exp_fixed(x);
    return data_t'($signed({5'd0, e[COEF_W-1:CFRAC-FRAC]}) - 25'sd256);
  endfunction

  // Entry of an adjacency buffer: the target node local to the sub-slice, a flag closing the
  // neighbour list of the current source node, and a flag for a source node that has no
  // neighbour in this sub-slice (a token that carries no node pair).
  typedef struct packed {
    logic        empty;
    logic        last;
    logic [13:0] tgt;
  } adj_entry_t;

endpackage
