// vd_pkg: constants, types and code tables shared by the multiple-specification
// Viterbi decoder.
//
// The decoder handles rate-1/2 convolutional codes with constraint length K from
// K_MIN = 3 to K_MAX = 9 (seven codeword tables, one per K) and a decoding depth
// D = m * K with m in {2, 3, 4}: 7 x 3 = 21 specifications. The distinct depths
// m * K form exactly N_TAPS = 16 values (6 ... 36), and the systolic traceback
// array has one output-capable (type2) component at each of them. Soft decisions
// are 4 bits wide. The K range, the 21 specifications, the 16 type2 components
// and the 4-bit soft decision follow the source design; the multiplier set
// {2, 3, 4} is this design's reading of how those numbers fit together.
//
// State convention: the state at trellis step t holds the last K-1 input bits,
// bit j = u[t-j]. The next state is ((s << 1) | u) masked to K-1 bits, so the two
// predecessors of s are (s >> 1) | (b << (K-2)) for b = 0, 1, and the input bit
// that led into s is s[0].
//
// Code polynomials are the usual maximum-free-distance rate-1/2 codes, written in
// octal with the most significant tap on the current input bit. The source design
// does not list its polynomials; these are this design's choice.
package vd_pkg;

  localparam int K_MIN     = 3;
  localparam int K_MAX     = 9;
  localparam int N_K       = K_MAX - K_MIN + 1;    // 7 codeword tables / ACS groups
  localparam int SW        = K_MAX - 1;            // state width at K_MAX
  localparam int NS        = 1 << SW;              // 256 states at K_MAX
  localparam int SOFT_W    = 4;                    // soft decision bits per symbol
  localparam int BM_W      = SOFT_W + 1;           // branch metric: sum of two symbols
  localparam int PM_W      = 10;                   // path metric
  localparam int PM_INIT   = 64;                   // start metric of states other than 0
  localparam int M_MIN     = 2;                    // decoding depth multipliers
  localparam int M_MAX     = 4;
  localparam int MAX_DEPTH = M_MAX * K_MAX;        // 36 traceback steps
  localparam int N_TAPS    = 16;                   // type2 components
  localparam int MIN_DEPTH = M_MIN * K_MIN;        // 6
  localparam int QDEPTH    = 2 * (MAX_DEPTH - MIN_DEPTH); // output shift register slots
  localparam int K_RESET   = 7;                    // specification after reset
  localparam int M_RESET   = 4;

  typedef logic [3:0]      klen_t;   // constraint length, 3..9
  typedef logic [2:0]      dmul_t;   // decoding depth multiplier, 2..4
  typedef logic [5:0]      depth_t;  // decoding depth in steps, 0..36
  typedef logic [SW-1:0]   state_t;
  typedef logic [NS-1:0]   decvec_t; // one survivor decision bit per state
  typedef logic [SOFT_W-1:0] soft_t;
  typedef logic [BM_W-1:0] bm_t;
  typedef logic [PM_W-1:0] pm_t;

  // Generator polynomials (octal, MSB on the current input) for each K.
  function automatic logic [8:0] gen_poly(int k, int i);
    logic [8:0] g0, g1;
    case (k)
      3:       begin g0 = 9'o007; g1 = 9'o005; end
      4:       begin g0 = 9'o015; g1 = 9'o017; end
      5:       begin g0 = 9'o023; g1 = 9'o035; end
      6:       begin g0 = 9'o053; g1 = 9'o075; end
      7:       begin g0 = 9'o171; g1 = 9'o133; end
      8:       begin g0 = 9'o247; g1 = 9'o371; end
      default: begin g0 = 9'o561; g1 = 9'o753; end
    endcase
    return (i == 0) ? g0 : g1;
  endfunction

  // Codeword {c1, c0} on the branch into state s from the predecessor whose
  // oldest bit is b. The encoder window is w[j] = u[t-j]: w[K-2:0] = s, w[K-1] = b.
  // Generator tap g[K-1-j] multiplies u[t-j].
  function automatic logic [1:0] codeword(int k, int s, bit b);
    logic [1:0] c;
    for (int i = 0; i < 2; i++) begin
      logic [8:0] g;
      logic       p;
      g = gen_poly(k, i);
      p = 1'b0;
      for (int j = 0; j < k; j++) begin
        logic w;
        w = (j == k - 1) ? b : s[j];
        p = p ^ (g[k-1-j] & w);
      end
      c[i] = p;
    end
    return c;
  endfunction

  // True when d = m * k for some supported m and k.
  function automatic bit is_depth(int d);
    for (int k = K_MIN; k <= K_MAX; k++)
      for (int m = M_MIN; m <= M_MAX; m++)
        if (m * k == d) return 1'b1;
    return 1'b0;
  endfunction

  // Depth of the idx-th type2 component, in increasing order.
  function automatic int tap_depth(int idx);
    int n;
    n = 0;
    for (int d = 1; d <= MAX_DEPTH; d++)
      if (is_depth(d)) begin
        if (n == idx) return d;
        n++;
      end
    return 0;
  endfunction

  // Index of the type2 component at depth d (d must be a supported depth).
  function automatic logic [3:0] tap_index(int d);
    for (int i = 0; i < N_TAPS; i++)
      if (tap_depth(i) == d) return 4'(i);
    return 4'd0;
  endfunction

endpackage
