// onn_ref_pkg -- reference models used by the ONN testbenches.
//
// * onn_simulate: period-by-period model of the network dynamics (16 samples
//   per period, +w/-w synapses, sign reference, early/late mismatch counts,
//   one phase step per period, stop after STABLE quiet periods or MAXP
//   periods), written from the behaviour the RTL documents, not from its code.
// * Host-side learning as the processor runs it: Hebbian and Storkey rules on
//   +1/-1 patterns, kept in floating point, then scaled to integers in
//   -15..+15 for the 5-bit synapses (w_int = round(15 * w / max|w|), zero
//   matrix stays zero). The diagonal is kept at zero.
// * The 5x3 digit patterns 0, 1, 2 and a 15-image test set (each clean digit
//   plus four corrupted copies: two single-pixel flips, one grey pixel at
//   phase 4, one two-pixel flip).
// * Packing of the weight matrix into 32-bit words, six 5-bit weights each.
package onn_ref_pkg;

  localparam int N  = 15;
  localparam int NP = 3;    // training patterns
  localparam int NT = 15;   // test images

  typedef int    mat_t   [N][N];
  typedef real   rmat_t  [N][N];
  typedef int    phases_t[N];

  // Digits, rows of 3 pixels from the top, bit 14 = top-left pixel.
  function automatic logic [N-1:0] digit(input int d);
    case (d)
      0:       return 15'b111_101_101_101_111;
      1:       return 15'b110_010_010_010_111;
      default: return 15'b111_001_111_100_111;
    endcase
  endfunction

  // Pixel index i (0..14) of a pattern, bit i.
  function automatic int bipolar(input logic [N-1:0] p, input int i);
    return p[i] ? 1 : -1;
  endfunction

  // Binary image -> initial phases: black (1) = 8 (180 degrees), white = 0.
  function automatic phases_t image_phases(input logic [N-1:0] p);
    phases_t ph;
    for (int i = 0; i < N; i++) ph[i] = p[i] ? 8 : 0;
    return ph;
  endfunction

  // Test image t: digit t/5, variant t%5.
  function automatic phases_t test_image(input int t);
    int d, v;
    logic [N-1:0] p;
    phases_t ph;
    d = t / 5;
    v = t % 5;
    p = digit(d);
    case (v)
      1: p[(d*5 + 1) % N] = ~p[(d*5 + 1) % N];
      2: p[(d*5 + 7) % N] = ~p[(d*5 + 7) % N];
      4: begin
           p[(d + 11) % N] = ~p[(d + 11) % N];
           p[(d + 13) % N] = ~p[(d + 13) % N];
         end
      default: ;
    endcase
    ph = image_phases(p);
    if (v == 3) ph[(d*5 + 3) % N] = 4;
    return ph;
  endfunction

  function automatic void hebbian_learn(inout rmat_t w, input logic [N-1:0] p);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        if (i != j) w[i][j] += real'(bipolar(p, i) * bipolar(p, j)) / N;
  endfunction

  function automatic void storkey_learn(inout rmat_t w, input logic [N-1:0] p);
    rmat_t nw;
    real h_ij, h_ji;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        nw[i][j] = 0.0;
        if (i != j) begin
          h_ij = 0.0;
          h_ji = 0.0;
          for (int k = 0; k < N; k++) begin
            if (k != i && k != j) begin
              h_ij += w[i][k] * bipolar(p, k);
              h_ji += w[j][k] * bipolar(p, k);
            end
          end
          nw[i][j] = w[i][j] + (real'(bipolar(p, i) * bipolar(p, j))
                     - bipolar(p, i) * h_ji - h_ij * bipolar(p, j)) / N;
        end
      end
    w = nw;
  endfunction

  function automatic mat_t quantise(input rmat_t w);
    mat_t q;
    real m;
    m = 0.0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        if ((w[i][j] < 0 ? -w[i][j] : w[i][j]) > m) m = (w[i][j] < 0 ? -w[i][j] : w[i][j]);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        real v;
        v = (m == 0.0) ? 0.0 : 15.0 * w[i][j] / m;
        q[i][j] = (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
      end
    return q;
  endfunction

  // Weight word k: weights 6k..6k+5 (row-major), 5 bits each from bit 0.
  function automatic logic [31:0] pack_word(input mat_t w, input int k);
    logic [31:0] d;
    d = '0;
    for (int m = 0; m < 6; m++) begin
      int n;
      n = k * 6 + m;
      if (n < N * N) d[m*5 +: 5] = 5'(w[n / N][n % N]);
    end
    return d;
  endfunction

  // Network dynamics, period by period.
  function automatic void onn_simulate(input mat_t w, input phases_t ph_in,
                                       input int stable_need, input int maxp,
                                       output phases_t ph, output int periods,
                                       output bit tmo);
    int stable;
    ph      = ph_in;
    periods = 0;
    stable  = 0;
    tmo     = 0;
    forever begin
      int  late [N];
      int  early[N];
      bit  osc  [N];
      bit  changed;
      for (int i = 0; i < N; i++) begin late[i] = 0; early[i] = 0; end
      for (int t = 0; t < 16; t++) begin
        for (int j = 0; j < N; j++) osc[j] = (((t - ph[j]) & 15) < 8);
        for (int i = 0; i < N; i++) begin
          int s, k;
          bit r;
          s = 0;
          for (int j = 0; j < N; j++) s += osc[j] ? w[i][j] : -w[i][j];
          r = (s > 0) ? 1'b1 : (s < 0) ? 1'b0 : osc[i];
          k = (t - ph[i]) & 15;
          if (r != osc[i]) begin
            if ((k % 8) >= 4) early[i]++;
            else              late[i]++;
          end
        end
      end
      changed = 0;
      for (int i = 0; i < N; i++) begin
        if (late[i] > early[i])              begin ph[i] = (ph[i] + 1) & 15; changed = 1; end
        else if (early[i] > late[i])         begin ph[i] = (ph[i] + 15) & 15; changed = 1; end
        else if (late[i] + early[i] > 8)     begin ph[i] = (ph[i] + 1) & 15; changed = 1; end
      end
      periods++;
      stable = changed ? 0 : stable + 1;
      if (stable >= stable_need) break;
      if (periods >= maxp) begin tmo = 1; break; end
    end
  endfunction

  // Binary read-out relative to neuron 0 (circular distance above 4 steps).
  function automatic logic [N-1:0] pattern_of(input phases_t ph);
    logic [N-1:0] p;
    for (int i = 0; i < N; i++) begin
      int d;
      d = (ph[i] - ph[0]) & 15;
      if (d >= 8) d = 16 - d;
      p[i] = (d > 4);
    end
    return p;
  endfunction

  // A pattern as the read-out shows it: relative to pixel 0.
  function automatic logic [N-1:0] relative(input logic [N-1:0] p);
    return p ^ {N{p[0]}};
  endfunction

endpackage
