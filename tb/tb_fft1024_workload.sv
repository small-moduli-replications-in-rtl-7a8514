// tb_fft1024_workload: a 1024-point complex FFT computed with the MRRNS radix-4
// element at its default size, the workload the design is meant for.
//
// The testbench plays the part of the FFT memory and address sequencer: it
// digit-reverses 1024 random complex inputs (14-bit magnitude plus sign),
// runs the five radix-4 decimation-in-time stages, offering the 256
// butterflies of a stage back to back with twiddles round(2^14 e^(-2 pi j n q/L))
// (15 bits with sign), and stores each output divided by 4 (rounded to
// nearest) so the next stage's operands stay below 2^16. Every element output
// is checked bit-exactly against the ring-level model (signed-digit
// convolution, coefficients taken modulo 105 into [-52, 52], floor scaling by
// 2^14). The final spectrum is compared with a double-precision DFT of the
// input divided by 4^5 and the relative RMS error is printed; it must stay
// below 2e-3. Butterflies whose coefficients wrapped modulo 105 are counted.
module tb_fft1024_workload;
  import mrrns_pkg::*;

  localparam int MW = 16, S = 14, NW = 31, N = 1024;
  localparam real PI = 3.14159265358979;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, in_valid, in_ready, out_valid;
  logic [1:0] out_k;
  logic [3:0] x_re_sgn, x_im_sgn, w_re_sgn, w_im_sgn;
  logic [3:0][MW-1:0] x_re_mag, x_im_mag, w_re_mag, w_im_mag;
  logic signed [23:0] out_re, out_im;

  mrrns_radix4 dut (.*);

  int checks = 0, failures = 0, n_wrap = 0;
  int xr0 [N], xi0 [N];            // original input
  int ar [N], ai [N];              // working memory
  longint q_re[$], q_im[$];
  int q_addr[$];

  function automatic int wrap105(int v);
    int r;
    r = ((v % 105) + 105) % 105;
    return (r > 52) ? r - 105 : r;
  endfunction

  function automatic int dig(int v, int i);
    int m;
    m = v < 0 ? -v : v;
    m = (m >> i) & 1;
    return v < 0 ? -m : m;
  endfunction

  // Expected element output for combined coefficients (cr, ci).
  task automatic model(int xr[4], int xi[4], int cr[4], int ci[4], output longint er, output longint ei);
    int re_q[NW], im_q[NW];
    bit wrapped;
    for (int q = 0; q < NW; q++) begin re_q[q] = 0; im_q[q] = 0; end
    for (int n = 0; n < 4; n++)
      for (int i = 0; i < MW; i++) begin
        int a, b;
        a = dig(xr[n], i); b = dig(xi[n], i);
        if (a != 0 || b != 0)
          for (int j = 0; j < MW; j++) begin
            re_q[i+j] += a * dig(cr[n], j) - b * dig(ci[n], j);
            im_q[i+j] += a * dig(ci[n], j) + b * dig(cr[n], j);
          end
      end
    er = 0; ei = 0; wrapped = 0;
    for (int q = 0; q < NW; q++) begin
      if (re_q[q] != wrap105(re_q[q]) || im_q[q] != wrap105(im_q[q])) wrapped = 1;
      er += longint'(wrap105(re_q[q])) <<< q;
      ei += longint'(wrap105(im_q[q])) <<< q;
    end
    if (wrapped) n_wrap++;
    er = er >>> S;
    ei = ei >>> S;
  endtask

  function automatic int div4(longint v);
    return int'((v + 2) >>> 2);
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Collect element outputs into the working memory.
  int outs_seen = 0;
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      longint er, ei;
      int addr;
      er = q_re.pop_front(); ei = q_im.pop_front(); addr = q_addr.pop_front();
      checks++;
      if (longint'(out_re) != er || longint'(out_im) != ei) begin
        failures++;
        if (failures < 10) $display("FAIL addr=%0d re=%0d exp=%0d im=%0d exp=%0d", addr, out_re, er, out_im, ei);
      end
      ar[addr] = div4(longint'(out_re));
      ai[addr] = div4(longint'(out_im));
      outs_seen++;
    end
  end

  initial begin
    real err2, ref2, rrms;
    int maxmag;
    rst_n = 0; in_valid = 0;
    x_re_sgn = '0; x_re_mag = '0; x_im_sgn = '0; x_im_mag = '0;
    w_re_sgn = '0; w_re_mag = '0; w_im_sgn = '0; w_im_mag = '0;
    for (int i = 0; i < N; i++) begin
      xr0[i] = $urandom_range(16383); if ($urandom_range(1)) xr0[i] = -xr0[i];
      xi0[i] = $urandom_range(16383); if ($urandom_range(1)) xi0[i] = -xi0[i];
    end
    // Base-4 digit reversal of the input order.
    for (int i = 0; i < N; i++) begin
      int r, v;
      r = 0; v = i;
      for (int d = 0; d < 5; d++) begin r = (r << 2) | (v & 3); v >>= 2; end
      ar[r] = xr0[i];
      ai[r] = xi0[i];
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int st = 0; st < 5; st++) begin
      int L, Q, target;
      L = 4 << (2 * st);
      Q = L / 4;
      target = outs_seen + N;
      maxmag = 0;
      for (int g = 0; g < N; g += L)
        for (int j = 0; j < Q; j++) begin
          int xr[4], xi[4], wr[4], wi[4], cr[4], ci[4];
          for (int n = 0; n < 4; n++) begin
            xr[n] = ar[g + j + n * Q];
            xi[n] = ai[g + j + n * Q];
            if ((xr[n] < 0 ? -xr[n] : xr[n]) > maxmag) maxmag = xr[n] < 0 ? -xr[n] : xr[n];
            wr[n] = int'($floor(16384.0 * $cos(2.0 * PI * n * j / L) + 0.5));
            wi[n] = int'($floor(-16384.0 * $sin(2.0 * PI * n * j / L) + 0.5));
            x_re_sgn[n] = xr[n] < 0; x_re_mag[n] = MW'(xr[n] < 0 ? -xr[n] : xr[n]);
            x_im_sgn[n] = xi[n] < 0; x_im_mag[n] = MW'(xi[n] < 0 ? -xi[n] : xi[n]);
            w_re_sgn[n] = wr[n] < 0; w_re_mag[n] = MW'(wr[n] < 0 ? -wr[n] : wr[n]);
            w_im_sgn[n] = wi[n] < 0; w_im_mag[n] = MW'(wi[n] < 0 ? -wi[n] : wi[n]);
          end
          for (int k = 0; k < 4; k++) begin
            longint er, ei;
            for (int n = 0; n < 4; n++)
              case ((n * k) % 4)
                0: begin cr[n] =  wr[n]; ci[n] =  wi[n]; end
                1: begin cr[n] =  wi[n]; ci[n] = -wr[n]; end
                2: begin cr[n] = -wr[n]; ci[n] = -wi[n]; end
                default: begin cr[n] = -wi[n]; ci[n] = wr[n]; end
              endcase
            model(xr, xi, cr, ci, er, ei);
            q_re.push_back(er); q_im.push_back(ei); q_addr.push_back(g + j + k * Q);
          end
          in_valid = 1;
          @(posedge clk);
          while (!in_ready) @(posedge clk);
          #1;
          in_valid = 0;
        end
      // Drain the pipeline before the next stage reads its operands.
      while (outs_seen < target) @(posedge clk);
      @(negedge clk);
      checks++;
      if (maxmag >= 65536) begin failures++; $display("FAIL operand overflow in stage %0d", st); end
    end
    // Double-precision reference DFT, divided by 4^5.
    err2 = 0; ref2 = 0;
    for (int k = 0; k < N; k++) begin
      real sr, si;
      sr = 0; si = 0;
      for (int n = 0; n < N; n++) begin
        real ang;
        ang = -2.0 * PI * ((n * k) % N) / N;
        sr += xr0[n] * $cos(ang) - xi0[n] * $sin(ang);
        si += xr0[n] * $sin(ang) + xi0[n] * $cos(ang);
      end
      sr /= 1024.0; si /= 1024.0;
      err2 += (ar[k] - sr) ** 2 + (ai[k] - si) ** 2;
      ref2 += sr ** 2 + si ** 2;
    end
    rrms = $sqrt(err2 / ref2);
    $display("1024-point FFT: relative RMS error %e, butterfly outputs with coefficients wrapped mod 105: %0d", rrms, n_wrap);
    checks++;
    if (!(rrms < 2.0e-3)) begin failures++; $display("FAIL relative RMS error too large"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
