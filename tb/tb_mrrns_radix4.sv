// tb_mrrns_radix4: end-to-end test of the MRRNS radix-4 element at its default
// size (16-bit magnitudes, S = 14, 729 ring channels).
//
// Butterflies of random 14-bit-plus-sign complex data and 15-bit twiddles
// (round(2^14 * exp(-2*pi*j*m/64))) are offered, mostly back to back, with
// some idle gaps, plus sparse operands with few set bits. For each output k the
// expected value is computed here without the ring machinery: the combined
// coefficient w_n (-j)^(nk) is formed with integer complex arithmetic; the
// power-of-two coefficients of the result are the convolutions
//   re_q = sum_n sum_{i+j=q} (a_i c_j - b_i d_j),  im_q = ... (a_i d_j + b_i c_j)
// of the signed bit digits; each is taken modulo 105 into [-52, 52] (what the
// rings can represent); and the scaled result is floor(sum_q re_q 2^q / 2^S).
// When no coefficient left [-52, 52] the output must also equal the exact
// complex result divided by 2^S, rounded down. Checks: every output value and
// k, the order of outputs, the latency of 11 clocks from acceptance to the
// k = 0 output, and one output per clock during back-to-back operation.
// Mechanisms counted (each must occur): back-to-back acceptance, acceptance
// after an idle gap, in_ready held low, outputs for each k, a coefficient
// wrapped by the modulus 105, an output with a discarded fraction (scaling
// truncation), an exact-match output with no wrap.
module tb_mrrns_radix4;
  import mrrns_pkg::*;

  localparam int MW = 16, S = 14, NW = 31, OUT_W = 24, LAT = 11;
  localparam real PI = 3.14159265358979;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, in_valid, in_ready, out_valid;
  logic [1:0] out_k;
  logic [3:0] x_re_sgn, x_im_sgn, w_re_sgn, w_im_sgn;
  logic [3:0][MW-1:0] x_re_mag, x_im_mag, w_re_mag, w_im_mag;
  logic signed [OUT_W-1:0] out_re, out_im;

  mrrns_radix4 dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_b2b = 0, n_gap = 0, n_notready = 0, n_wrap = 0, n_frac = 0, n_exact = 0;
  int n_k [4] = '{0, 0, 0, 0};
  longint q_re[$], q_im[$];
  int q_k[$], q_exact[$];
  longint x_re_exact[$], x_im_exact[$];
  int acc_cycle[$];

  always @(posedge clk) cyc <= cyc + 1;

  function automatic int sm(logic s, logic [MW-1:0] m);
    return s ? -int'(m) : int'(m);
  endfunction

  function automatic int wrap105(int v);
    int r;
    r = ((v % 105) + 105) % 105;
    return (r > 52) ? r - 105 : r;
  endfunction

  // Compute and queue the four expected outputs of one butterfly.
  task automatic model(int xr[4], int xi[4], int wr[4], int wi[4]);
    for (int k = 0; k < 4; k++) begin
      int cr[4], ci[4];
      int re_q[NW], im_q[NW];
      longint vre, vim, tre, tim;
      bit wrapped;
      for (int n = 0; n < 4; n++) begin
        case ((n * k) % 4)
          0: begin cr[n] =  wr[n]; ci[n] =  wi[n]; end
          1: begin cr[n] =  wi[n]; ci[n] = -wr[n]; end
          2: begin cr[n] = -wr[n]; ci[n] = -wi[n]; end
          default: begin cr[n] = -wi[n]; ci[n] = wr[n]; end
        endcase
      end
      for (int q = 0; q < NW; q++) begin re_q[q] = 0; im_q[q] = 0; end
      tre = 0; tim = 0;
      for (int n = 0; n < 4; n++) begin
        tre += longint'(xr[n]) * cr[n] - longint'(xi[n]) * ci[n];
        tim += longint'(xr[n]) * ci[n] + longint'(xi[n]) * cr[n];
        for (int i = 0; i < MW; i++)
          for (int j = 0; j < MW; j++) begin
            int a, b, c, d;
            a = ((xr[n] < 0 ? -xr[n] : xr[n]) >> i) & 1; if (xr[n] < 0) a = -a;
            b = ((xi[n] < 0 ? -xi[n] : xi[n]) >> i) & 1; if (xi[n] < 0) b = -b;
            c = ((cr[n] < 0 ? -cr[n] : cr[n]) >> j) & 1; if (cr[n] < 0) c = -c;
            d = ((ci[n] < 0 ? -ci[n] : ci[n]) >> j) & 1; if (ci[n] < 0) d = -d;
            re_q[i+j] += a * c - b * d;
            im_q[i+j] += a * d + b * c;
          end
      end
      vre = 0; vim = 0; wrapped = 0;
      for (int q = 0; q < NW; q++) begin
        if (re_q[q] != wrap105(re_q[q]) || im_q[q] != wrap105(im_q[q])) wrapped = 1;
        vre += longint'(wrap105(re_q[q])) <<< q;
        vim += longint'(wrap105(im_q[q])) <<< q;
      end
      if (wrapped) n_wrap++;
      if ((vre & ((1 << S) - 1)) != 0) n_frac++;
      q_re.push_back(vre >>> S);
      q_im.push_back(vim >>> S);
      q_k.push_back(k);
      q_exact.push_back(!wrapped);
      x_re_exact.push_back(tre >>> S);
      x_im_exact.push_back(tim >>> S);
    end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output checker.
  int last_out_cyc = -1, expect_k0_cyc[$];
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      if (q_re.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        longint er, ei, xr_e, xi_e;
        int ek, ex;
        er = q_re.pop_front(); ei = q_im.pop_front(); ek = q_k.pop_front();
        ex = q_exact.pop_front(); xr_e = x_re_exact.pop_front(); xi_e = x_im_exact.pop_front();
        checks += 3;
        if (int'(out_k) != ek) begin failures++; $display("FAIL k got=%0d exp=%0d", out_k, ek); end
        if (longint'(out_re) != er || longint'(out_im) != ei) begin
          failures++;
          $display("FAIL k=%0d re=%0d exp=%0d im=%0d exp=%0d", ek, out_re, er, out_im, ei);
        end
        if (ek == 0) begin
          int ac;
          ac = expect_k0_cyc.pop_front();
          // Sampled after the edge: acceptance edge + LAT edges.
          checks++;
          if (cyc - ac - 1 != LAT) begin failures++; $display("FAIL latency %0d", cyc - ac - 1); end
        end
        if (ex != 0) begin
          n_exact++;
          checks++;
          if (longint'(out_re) != xr_e || longint'(out_im) != xi_e) begin
            failures++;
            $display("FAIL exact re=%0d exp=%0d im=%0d exp=%0d", out_re, xr_e, out_im, xi_e);
          end
        end
        n_k[ek]++;
      end
    end
  end

  initial begin
    int xr[4], xi[4], wr[4], wi[4];
    bit was_busy;
    rst_n = 0; in_valid = 0;
    x_re_sgn = '0; x_re_mag = '0; x_im_sgn = '0; x_im_mag = '0;
    w_re_sgn = '0; w_re_mag = '0; w_im_sgn = '0; w_im_mag = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      was_busy = !in_ready || (dut.issue_valid);
      in_valid = (t % 37 < 30);
      for (int n = 0; n < 4; n++) begin
        int m;
        if (t % 13 == 7) begin
          // Saturated operands of one sign: power-of-two coefficients exceed 52.
          xr[n] = 16383; xi[n] = 0; wr[n] = 32767; wi[n] = 0;
        end else if (t % 11 == 5) begin
          // Sparse operands: few set bits, no modular wrap expected.
          xr[n] = 1 << $urandom_range(13); if ($urandom_range(1)) xr[n] = -xr[n];
          xi[n] = ($urandom_range(1) << $urandom_range(13)); if ($urandom_range(1)) xi[n] = -xi[n];
          wr[n] = 1 << $urandom_range(14); if ($urandom_range(1)) wr[n] = -wr[n];
          wi[n] = 0;
        end else begin
          xr[n] = $urandom_range(16383); if ($urandom_range(1)) xr[n] = -xr[n];
          xi[n] = $urandom_range(16383); if ($urandom_range(1)) xi[n] = -xi[n];
          m = $urandom_range(63);
          wr[n] = int'($floor(16384.0 * $cos(2.0 * PI * m / 64.0) + 0.5));
          wi[n] = int'($floor(-16384.0 * $sin(2.0 * PI * m / 64.0) + 0.5));
        end
        x_re_sgn[n] = xr[n] < 0; x_re_mag[n] = MW'(xr[n] < 0 ? -xr[n] : xr[n]);
        x_im_sgn[n] = xi[n] < 0; x_im_mag[n] = MW'(xi[n] < 0 ? -xi[n] : xi[n]);
        w_re_sgn[n] = wr[n] < 0; w_re_mag[n] = MW'(wr[n] < 0 ? -wr[n] : wr[n]);
        w_im_sgn[n] = wi[n] < 0; w_im_mag[n] = MW'(wi[n] < 0 ? -wi[n] : wi[n]);
      end
      #1;
      if (in_valid && !in_ready) n_notready++;
      if (in_valid && in_ready) begin
        if (dut.issue_valid) n_b2b++; else n_gap++;
        expect_k0_cyc.push_back(cyc);
        model(xr, xi, wr, wi);
      end
      @(posedge clk);
    end
    in_valid = 0;
    repeat (20) @(posedge clk);
    @(negedge clk);
    checks++;
    if (q_re.size() != 0) begin failures++; $display("FAIL %0d outputs missing", q_re.size()); end
    $display("mechanisms: back_to_back=%0d after_gap=%0d not_ready=%0d k0..3=%0d/%0d/%0d/%0d wrap105=%0d truncated=%0d exact=%0d",
             n_b2b, n_gap, n_notready, n_k[0], n_k[1], n_k[2], n_k[3], n_wrap, n_frac, n_exact);
    checks++;
    if (n_b2b == 0 || n_gap == 0 || n_notready == 0 || n_k[0] == 0 || n_k[1] == 0 || n_k[2] == 0 ||
        n_k[3] == 0 || n_wrap == 0 || n_frac == 0 || n_exact == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
