// ldpc_tb_pkg: reference models for the hybrid H-matrix LDPC testbenches.
//
// Written apart from the RTL: it builds H = [Hd, Hp] as an explicit edge
// list from its own copy of the base-matrix shifts, encodes with the parity
// equation p_0 = sum_j h_0j d_j, p_i = p_(i-1) + sum_j h_ij d_j, models a
// BPSK/AWGN channel, and runs the same quantised log-domain decoder as the
// hardware (flooding schedule, 4-bit magnitudes with LSB 0.25, F function
// computed with real arithmetic) so that decoder outputs can be compared
// bit for bit.
package ldpc_tb_pkg;

  localparam int P = 64, MBLK = 8, KBITS = 512, MROWS = 512, NBITS = 1024;
  localparam int MAXDEG = 5;

  // Right-shift of each identity block, -1 = zero block.
  localparam int SHIFT [8][8] = '{
    '{-1, 41, 35, 62, -1, -1, -1, -1},
    '{ 4, -1, -1, 33, -1, -1, 44, -1},
    '{22, -1, 46, -1, -1, 18, -1, -1},
    '{16, -1, -1, -1,  9, -1, -1, 49},
    '{-1, 49, -1, -1, -1, 59, -1, 41},
    '{-1, -1, -1, 43, 51, 38, -1, -1},
    '{-1, -1, 27, -1, -1, -1, 60,  7},
    '{-1, 12, -1, -1, 62, -1, 25, -1}
  };

  // Column indices of the ones of row i (deg[i] of them).
  int row_cols [MROWS][MAXDEG];
  int row_deg  [MROWS];

  function automatic void build_h();
    for (int i = 0; i < MROWS; i++) begin
      int br = i / P, r = i % P, n = 0;
      for (int bc = 0; bc < 8; bc++)
        if (SHIFT[br][bc] >= 0) begin
          row_cols[i][n] = bc * P + (r + SHIFT[br][bc]) % P;
          n++;
        end
      row_cols[i][n] = KBITS + i; n++;
      if (i > 0) begin row_cols[i][n] = KBITS + i - 1; n++; end
      row_deg[i] = n;
    end
  endfunction

  // Parity bits by the accumulating parity equation.
  function automatic void encode(input bit d [KBITS], output bit c [NBITS]);
    bit acc = 0;
    for (int j = 0; j < KBITS; j++) c[j] = d[j];
    for (int i = 0; i < MROWS; i++) begin
      bit s = 0;
      for (int e = 0; e < 3; e++) s ^= d[row_cols[i][e]];
      acc = (i == 0) ? s : (acc ^ s);
      c[KBITS + i] = acc;
    end
  endfunction

  // Number of unsatisfied checks of a word.
  function automatic int syndrome_weight(input bit c [NBITS]);
    int w = 0;
    for (int i = 0; i < MROWS; i++) begin
      bit s = 0;
      for (int e = 0; e < row_deg[i]; e++) s ^= c[row_cols[i][e]];
      w += s;
    end
    return w;
  endfunction

  // Quantised phi(x) = -ln(tanh(x/2)) with LSB 0.25 and a 4-bit result.
  function automatic int phi_q(input int k);
    real v;
    if (k == 0) return 15;
    v = -$ln($tanh(real'(k) / 8.0)) * 4.0;
    if (v > 15.0) return 15;
    return int'(v);
  endfunction

  function automatic int sat15(input int v);
    return (v > 15) ? 15 : ((v < -15) ? -15 : v);
  endfunction

  // LLR in signed quarter units: sign of y, magnitude min(15, (|y|*g+8)>>4).
  // A negative sample with magnitude 0 keeps its sign bit, so the result
  // is returned as sign and magnitude.
  function automatic void llr_of(input int y, input int gain, output bit sgn, output int mag);
    int a = (y < 0) ? -y : y;
    int m = (a * gain + 8) / 16;
    sgn = (y < 0);
    mag = (m > 15) ? 15 : m;
  endfunction

  // Gaussian sample, Box-Muller.
  function automatic real gauss();
    real u1 = (real'($urandom_range(1, 1 << 30))) / real'(1 << 30);
    real u2 = (real'($urandom_range(0, 1 << 30))) / real'(1 << 30);
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  // Channel sample for code bit c: amplitude 8 (+8 for 0, -8 for 1) plus
  // noise of standard deviation sigma*8, rounded and clipped to 6 bits.
  function automatic int channel(input bit c, input real sigma);
    real v = (c ? -8.0 : 8.0) + 8.0 * sigma * gauss();
    int y = int'(v);
    if (y > 31) y = 31;
    if (y < -32) y = -32;
    return y;
  endfunction

  // Bit-exact model of the decoder. Messages per edge (row i, slot e):
  // q_sgn/q_phi after the variable pass (sign and phi(|q|)), r_sgn/r_mag
  // after the check pass (sign and |r|).
  function automatic void decode(input int y [NBITS], input int gain,
                                 input int iters, output bit hard [NBITS]);
    bit ls [NBITS];
    int lm [NBITS];
    bit q_sgn [MROWS][MAXDEG];
    int q_phi [MROWS][MAXDEG];
    bit r_sgn [MROWS][MAXDEG];
    int r_mag [MROWS][MAXDEG];
    int total [NBITS];
    for (int v = 0; v < NBITS; v++) llr_of(y[v], gain, ls[v], lm[v]);
    for (int it = 0; it <= iters; it++) begin
      // variable pass (it = 0: initial pass without check messages)
      for (int v = 0; v < NBITS; v++) total[v] = ls[v] ? -lm[v] : lm[v];
      if (it > 0)
        for (int i = 0; i < MROWS; i++)
          for (int e = 0; e < row_deg[i]; e++)
            total[row_cols[i][e]] += r_sgn[i][e] ? -r_mag[i][e] : r_mag[i][e];
      for (int v = 0; v < NBITS; v++) hard[v] = (total[v] < 0);
      if (it == iters) break;
      for (int i = 0; i < MROWS; i++)
        for (int e = 0; e < row_deg[i]; e++) begin
          int own = (it == 0) ? 0 : (r_sgn[i][e] ? -r_mag[i][e] : r_mag[i][e]);
          int q = total[row_cols[i][e]] - own;
          int qm;
          q_sgn[i][e] = (q < 0);
          qm = (q < 0) ? -q : q;
          if (qm > 15) qm = 15;
          q_phi[i][e] = phi_q(qm);
        end
      // check pass
      for (int i = 0; i < MROWS; i++) begin
        int s = 0;
        bit sg = 0;
        for (int e = 0; e < row_deg[i]; e++) begin
          s += q_phi[i][e];
          sg ^= q_sgn[i][e];
        end
        for (int e = 0; e < row_deg[i]; e++) begin
          int m = s - q_phi[i][e];
          if (m > 15) m = 15;
          r_sgn[i][e] = sg ^ q_sgn[i][e];
          r_mag[i][e] = phi_q(m);
        end
      end
    end
  endfunction

endpackage
