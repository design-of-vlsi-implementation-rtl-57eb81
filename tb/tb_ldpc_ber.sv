// tb_ldpc_ber: error-rate run of the default decoder (length-4096 (3,6)
// code, 20 iterations) over a binary-input AWGN channel with BPSK.
//
// For each Eb/N0 point the testbench sends FRAMES noisy frames of one fixed
// non-zero codeword (found by Gauss-Jordan elimination of H). The received
// value y = s + n (s = +1 for bit 0, -1 for bit 1, n Gaussian with variance
// 1 / (2 R Eb/N0), R = 1/2) gives the LLR 2y / sigma^2, quantized as
// round(2 * LLR) and saturated to +-31. Every frame is checked bit for bit,
// with its iteration count, against the bit-true reference decoder; the
// testbench then prints bit and frame error rates against the transmitted
// codeword and the average number of iterations for each point. It also
// checks that the frame error rate does not rise with Eb/N0 and is zero at
// the highest point. The point count is far too small for error-rate curves
// down to low rates; it shows the trend and exercises many iteration counts.
module tb_ldpc_ber;
  import ldpc_pkg::*;
  localparam int P = 64, MS = 32, NS = 64, DV = 3, DC = 6, W = 6, MAX_ITER = 20;
  localparam int N = P * NS, M = P * MS, L = NS * DV, E = L * P;
  localparam int HI = (1 << (W - 1)) - 1;
  localparam int FRAMES = 25;
  localparam int NPTS = 4;
  localparam real EBN0_DB [NPTS] = '{1.5, 2.0, 2.5, 3.0};

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, in_valid, in_ready, out_valid, out_ready, out_converged;
  logic signed [W-1:0] in_llr [NS];
  logic [NS-1:0] out_dec;
  logic [4:0] out_iter;

  ldpc_decoder dut (.*);

  int checks = 0, failures = 0;

  // ---------------- reference decoder ----------------
  int llr [N];
  int e_row [L], e_col [L], e_k [L];
  int msg [E];         // message on expanded edge e*P + r
  bit ref_dec [N];
  int ref_iter;
  bit ref_conv;

  function automatic int sat(int x);
    return (x > HI) ? HI : (x < -HI) ? -HI : x;
  endfunction

  function automatic int var_of(int ee);
    int e, r;
    e = ee / P; r = ee % P;
    return e_col[e] * P + (r + e_k[e]) % P;
  endfunction

  function automatic bit syndrome_ok();
    bit s [M];
    foreach (s[c]) s[c] = 0;
    for (int ee = 0; ee < E; ee++)
      s[e_row[ee / P] * P + ee % P] ^= ref_dec[var_of(ee)];
    foreach (s[c]) if (s[c]) return 0;
    return 1;
  endfunction

  task automatic ref_decode();
    int  tot [N];
    int  m1 [M], m2 [M], pos [M];
    bit  sg [M];
    for (int n = 0; n < N; n++) ref_dec[n] = (llr[n] < 0);
    for (int ee = 0; ee < E; ee++) msg[ee] = llr[var_of(ee)];
    ref_iter = 0; ref_conv = 0;
    forever begin
      if (syndrome_ok()) begin ref_conv = 1; return; end
      // check nodes: min-sum over all edges of each check
      for (int c = 0; c < M; c++) begin m1[c] = HI; m2[c] = HI; pos[c] = -1; sg[c] = 0; end
      for (int ee = 0; ee < E; ee++) begin
        int c, a;
        c = e_row[ee / P] * P + ee % P;
        a = (msg[ee] < -HI) ? HI : (msg[ee] < 0 ? -msg[ee] : msg[ee]);
        sg[c] ^= (msg[ee] < 0);
        if (a < m1[c]) begin m2[c] = m1[c]; m1[c] = a; pos[c] = ee; end
        else if (a < m2[c]) m2[c] = a;
      end
      for (int ee = 0; ee < E; ee++) begin
        int c, a, s;
        c = e_row[ee / P] * P + ee % P;
        a = (pos[c] == ee) ? m2[c] : m1[c];
        s = sg[c] ^ (msg[ee] < 0);
        msg[ee] = s ? -a : a;
      end
      // variable nodes
      for (int n = 0; n < N; n++) tot[n] = llr[n];
      for (int ee = 0; ee < E; ee++) tot[var_of(ee)] += msg[ee];
      for (int ee = 0; ee < E; ee++) msg[ee] = sat(tot[var_of(ee)] - msg[ee]);
      for (int n = 0; n < N; n++) ref_dec[n] = (tot[n] < 0);
      ref_iter++;
      if (ref_iter == MAX_ITER) return;
    end
  endtask

  // ---------------- a non-zero codeword ----------------
  // Gauss-Jordan elimination of H over GF(2); the non-pivot bits are chosen
  // at random and each pivot bit is the parity of its reduced row over them.
  logic [N-1:0] hrow [M];
  bit           cw [N];

  task automatic make_codeword();
    int rank, piv_col [M];
    logic [N-1:0] x, tmp;
    foreach (hrow[c]) hrow[c] = '0;
    for (int ee = 0; ee < E; ee++) hrow[e_row[ee / P] * P + ee % P][var_of(ee)] = 1'b1;
    rank = 0;
    for (int col = 0; col < N && rank < M; col++) begin
      int pr;
      pr = -1;
      for (int r = rank; r < M; r++) if (hrow[r][col]) begin pr = r; break; end
      if (pr < 0) continue;
      tmp = hrow[pr]; hrow[pr] = hrow[rank]; hrow[rank] = tmp;
      for (int r = 0; r < M; r++)
        if (r != rank && hrow[r][col]) hrow[r] ^= hrow[rank];
      piv_col[rank] = col;
      rank++;
    end
    x = '0;
    for (int n = 0; n < N; n++) x[n] = 1'($urandom);
    for (int r = 0; r < rank; r++) x[piv_col[r]] = 1'b0;
    for (int r = 0; r < rank; r++) x[piv_col[r]] = ^(hrow[r] & x);
    for (int n = 0; n < N; n++) cw[n] = x[n];
    $display("H has rank %0d; codeword weight %0d", rank, $countones(x));
  endtask

  // ---------------- channel ----------------
  function automatic real uniform01();
    return (real'($urandom_range(0, 32'h7FFF_FFFE)) + 1.0) / 2147483648.0;
  endfunction

  function automatic real gauss01();
    return $sqrt(-2.0 * $ln(uniform01())) * $cos(6.283185307179586 * uniform01());
  endfunction

  // ---------------- one frame through the decoder ----------------
  task automatic run_frame(output int bit_err, output int iters);
    int beat, obeat, bad;
    bit got [N];
    ref_decode();
    beat = 0;
    while (beat < P) begin
      in_valid = 1'b1;
      for (int v = 0; v < NS; v++) in_llr[v] = W'(llr[v * P + beat]);
      @(posedge clk);
      if (in_ready) beat++;
      #1;
    end
    in_valid = 0;
    while (!out_valid) begin @(posedge clk); #1; end
    checks++;
    if (int'(out_iter) != ref_iter || out_converged != ref_conv) begin
      failures++;
      $display("FAIL iter %0d conv %0d, expected %0d %0d", out_iter, out_converged, ref_iter, ref_conv);
    end
    out_ready = 1;
    for (obeat = 0; obeat < P; obeat++) begin
      #1;
      for (int v = 0; v < NS; v++) got[v * P + obeat] = out_dec[v];
      @(posedge clk);
    end
    #1 out_ready = 0;
    bad = 0; bit_err = 0;
    for (int n = 0; n < N; n++) begin
      if (got[n] != ref_dec[n]) bad++;
      if (got[n] != cw[n]) bit_err++;
    end
    checks++;
    if (bad != 0) begin
      failures++;
      $display("FAIL %0d decoded bits differ from the reference", bad);
    end
    iters = ref_iter;
  endtask

  initial begin
    int fer [NPTS];
    for (int e = 0; e < L; e++) begin
      e_col[e] = e / DV;
      e_row[e] = base_row(e / DV, e % DV, MS);
      e_k[e]   = edge_shift(e, P);
    end
    rst_n = 0; in_valid = 0; out_ready = 0;
    foreach (in_llr[v]) in_llr[v] = '0;
    make_codeword();
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    for (int pt = 0; pt < NPTS; pt++) begin
      real sigma2, sigma;
      int  bit_errs, frame_errs, iter_sum;
      sigma2 = 1.0 / (2.0 * 0.5 * (10.0 ** (EBN0_DB[pt] / 10.0)));
      sigma  = $sqrt(sigma2);
      bit_errs = 0; frame_errs = 0; iter_sum = 0;
      for (int f = 0; f < FRAMES; f++) begin
        int be, it;
        for (int n = 0; n < N; n++) begin
          real y, q;
          y = (cw[n] ? -1.0 : 1.0) + sigma * gauss01();
          q = 2.0 * (2.0 * y / sigma2);
          llr[n] = sat(int'(q));
        end
        run_frame(be, it);
        bit_errs += be;
        iter_sum += it;
        if (be != 0) frame_errs++;
      end
      fer[pt] = frame_errs;
      $display("Eb/N0 %0.1f dB: BER %e  FER %0d/%0d  average iterations %0.2f",
               EBN0_DB[pt], real'(bit_errs) / real'(N * FRAMES), frame_errs, FRAMES,
               real'(iter_sum) / real'(FRAMES));
    end
    for (int pt = 1; pt < NPTS; pt++) begin
      checks++;
      if (fer[pt] > fer[pt - 1]) begin
        failures++;
        $display("FAIL frame errors rise from %0d to %0d", fer[pt - 1], fer[pt]);
      end
    end
    checks++;
    if (fer[NPTS - 1] != 0) begin
      failures++;
      $display("FAIL frame errors at the highest Eb/N0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NPTS * FRAMES * (2 * P * MAX_ITER + 3 * P) + 1000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
