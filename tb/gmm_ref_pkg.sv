// gmm_ref_pkg: reference model of the GMM classifier for the testbenches.
//
// Computes, in plain integer arithmetic and straight from the mathematical
// definitions, what the hardware should return: s = x - mu,
// y_j = sum_{i>=j} s_i g_ij, z = sum y_j^2 (saturated to 40 bits), the
// piecewise-linear f1/f2/f3 of exp(-z) written from their mode formulas
// (not from the register datapath), the class scores sum K f(z) and the
// winner (strictly largest score, earliest class on a tie, none if all
// scores are zero). It also builds the bus word streams that load the
// register files, and random model sets.
package gmm_ref_pkg;
  localparam int D    = 5;
  localparam int NC   = 5;
  localparam int ZW   = 40;
  localparam longint unsigned ONE = (64'd1 << ZW) - 1;

  typedef struct {
    int mu [D];
    int g  [D][D];   // g[i][j], lower triangular (j <= i), 0-based
    int k;
  } model_t;

  typedef struct {
    int              mode;  // 1, 2 or 3
    longint unsigned a, b, c;
    int              sh;    // n - m
  } lpf_t;

  // region: 0 = "1" (z < a), 1 = first slope, 2 = second slope, 3 = zero
  function automatic longint unsigned f_ref(lpf_t p, longint unsigned z, output int region);
    longint unsigned v;
    if (z < p.a) begin region = 0; return ONE; end
    case (p.mode)
      1: begin region = 3; return 0; end
      2: if (z < p.b) begin region = 1; return p.b - z; end
         else begin region = 3; return 0; end
      default:
        if (z < p.b) begin
          region = 1;
          v = (p.b - z) << p.sh;
          if (((p.b - z) >> (64 - p.sh)) != 0 || v > ONE) v = ONE;
          return v;
        end else if (z < p.c) begin region = 2; return p.c - z; end
        else begin region = 3; return 0; end
    endcase
  endfunction

  // Register contents R1..R6 for a mode, as 21 bus words.
  function automatic void lpf_words(lpf_t p, ref int q[$]);
    longint unsigned r [1:5];
    int r6;
    r6 = 0;
    case (p.mode)
      1: r = '{p.a, p.a, 0, 0, 0};
      2: r = '{p.a, p.b, p.a, 0, p.b};
      default: begin r = '{p.a, p.c, p.b, p.b, p.c}; r6 = p.sh; end
    endcase
    for (int k = 1; k <= 5; k++)
      for (int w = 0; w < 4; w++) q.push_back(int'((r[k] >> (10*w)) & 10'h3ff));
    q.push_back(r6);
  endfunction

  function automatic void model_words(model_t m, ref int q[$]);
    for (int i = 0; i < D; i++) begin
      q.push_back(m.mu[i] & 10'h3ff);
      for (int j = 0; j <= i; j++) q.push_back(m.g[i][j] & 10'h3ff);
    end
  endfunction

  function automatic longint unsigned z_ref(int x [D], model_t m);
    longint s [D];
    longint y, z;
    z = 0;
    for (int i = 0; i < D; i++) s[i] = x[i] - m.mu[i];
    for (int j = 0; j < D; j++) begin
      y = 0;
      for (int i = j; i < D; i++) y += s[i] * m.g[i][j];
      z += y * y;
    end
    return (z > longint'(ONE)) ? ONE : longint'(z);
  endfunction

  // models[c * nm + m]; returns one-hot winner, scores and region counts
  function automatic logic [NC-1:0] classify(int x [D], model_t models[$], int nm, lpf_t p,
                                             output longint unsigned score [NC],
                                             ref int regions [4]);
    longint unsigned best;
    logic [NC-1:0] win;
    int rg;
    best = 0; win = '0;
    for (int c = 0; c < NC; c++) begin
      score[c] = 0;
      for (int m = 0; m < nm; m++) begin
        longint unsigned f;
        f = f_ref(p, z_ref(x, models[c*nm+m]), rg);
        regions[rg]++;
        score[c] += f * longint'(models[c*nm+m].k);
      end
      if (score[c] > best) begin best = score[c]; win = NC'(1) << c; end
    end
    return win;
  endfunction

  // Random model around centre cen: small G so that z spans the breakpoints.
  function automatic model_t rand_model(int cen);
    model_t m;
    for (int i = 0; i < D; i++) begin
      m.mu[i] = cen + int'($urandom_range(0, 20)) - 10;
      if (m.mu[i] < 0) m.mu[i] = 0;
      if (m.mu[i] > 1023) m.mu[i] = 1023;
      for (int j = 0; j < D; j++)
        m.g[i][j] = (j <= i) ? int'($urandom_range(0, 8)) - 4 : 0;
    end
    m.k = int'($urandom_range(1, 1023));
    return m;
  endfunction

  function automatic lpf_t rand_lpf(int mode);
    lpf_t p;
    p.mode = mode;
    p.a  = 64'd1 << $urandom_range(14, 17);
    p.b  = p.a + (64'd1 << $urandom_range(17, 19));
    p.c  = p.b + (64'd1 << $urandom_range(19, 21));
    p.sh = int'($urandom_range(8, 22));
    return p;
  endfunction

  // Command stream for the classifier node: {kind, 16-bit data} per entry,
  // kinds as in noc_pkg (1 LOAD_X, 2 LOAD_GMM, 3 LOAD_K, 4 LOAD_LPF,
  // 5 RESET, 6 START).
  function automatic void setup_cmds(model_t mods[$], lpf_t p, ref int q[$]);
    int w[$];
    q.push_back(5 << 16);
    lpf_words(p, w);
    foreach (w[n]) q.push_back((4 << 16) | w[n]);
    w = {};
    foreach (mods[i]) model_words(mods[i], w);
    foreach (w[n]) q.push_back((2 << 16) | w[n]);
    foreach (mods[i]) q.push_back((3 << 16) | (mods[i].k & 10'h3ff));
  endfunction

  function automatic void pattern_cmds(int x [D], int nm, ref int q[$]);
    for (int i = 0; i < D; i++) q.push_back((1 << 16) | x[i]);
    q.push_back((6 << 16) | nm);
  endfunction

  // A pattern near the centre of class cc, for models made with
  // rand_model(200 + 150 * c).
  function automatic void rand_pattern(int cc, output int x [D]);
    for (int i = 0; i < D; i++) x[i] = 200 + 150 * cc + int'($urandom_range(0, 40)) - 20;
  endfunction
endpackage
