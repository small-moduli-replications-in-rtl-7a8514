// tb_mrrns_radix4_nv2: the MRRNS radix-4 element built for 4-bit magnitudes
// (two bit indeterminates W, X plus T: 27 channels per modulus) with S = 3.
// Random butterflies of full-range 4-bit sign-magnitude data and coefficients
// are streamed back to back; every output is compared with the signed-digit
// convolution model (coefficients of 2^0..2^6 taken modulo 105 into [-52, 52],
// then floor(V / 2^3)). Shows that the design scales with NV and S.
module tb_mrrns_radix4_nv2;
  localparam int NV = 2, S = 3, MW = 4, NW = 7, OUT_W = NW - S + 7;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, in_valid, in_ready, out_valid;
  logic [1:0] out_k;
  logic [3:0] x_re_sgn, x_im_sgn, w_re_sgn, w_im_sgn;
  logic [3:0][MW-1:0] x_re_mag, x_im_mag, w_re_mag, w_im_mag;
  logic signed [OUT_W-1:0] out_re, out_im;

  mrrns_radix4 #(.NV(NV), .S(S)) dut (.*);

  int checks = 0, failures = 0;
  longint q_re[$], q_im[$];
  int q_k[$];

  function automatic int wrap105(int v);
    int r;
    r = ((v % 105) + 105) % 105;
    return (r > 52) ? r - 105 : r;
  endfunction

  function automatic int dig(int v, int i);
    int m;
    m = ((v < 0 ? -v : v) >> i) & 1;
    return v < 0 ? -m : m;
  endfunction

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (q_re.size() == 0) begin
        failures++;
      end else begin
        longint er, ei;
        int ek;
        er = q_re.pop_front(); ei = q_im.pop_front(); ek = q_k.pop_front();
        if (longint'(out_re) != er || longint'(out_im) != ei || int'(out_k) != ek) begin
          failures++;
          $display("FAIL k=%0d re=%0d exp=%0d im=%0d exp=%0d", ek, out_re, er, out_im, ei);
        end
      end
    end
  end

  initial begin
    int xr[4], xi[4], wr[4], wi[4];
    rst_n = 0; in_valid = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      in_valid = 1;
      for (int n = 0; n < 4; n++) begin
        xr[n] = $urandom_range(30) - 15; xi[n] = $urandom_range(30) - 15;
        wr[n] = $urandom_range(30) - 15; wi[n] = $urandom_range(30) - 15;
        x_re_sgn[n] = xr[n] < 0; x_re_mag[n] = MW'(xr[n] < 0 ? -xr[n] : xr[n]);
        x_im_sgn[n] = xi[n] < 0; x_im_mag[n] = MW'(xi[n] < 0 ? -xi[n] : xi[n]);
        w_re_sgn[n] = wr[n] < 0; w_re_mag[n] = MW'(wr[n] < 0 ? -wr[n] : wr[n]);
        w_im_sgn[n] = wi[n] < 0; w_im_mag[n] = MW'(wi[n] < 0 ? -wi[n] : wi[n]);
      end
      #1;
      if (in_ready) begin
        for (int k = 0; k < 4; k++) begin
          int cr[4], ci[4], re_q[NW], im_q[NW];
          longint vre, vim;
          for (int n = 0; n < 4; n++)
            case ((n * k) % 4)
              0: begin cr[n] =  wr[n]; ci[n] =  wi[n]; end
              1: begin cr[n] =  wi[n]; ci[n] = -wr[n]; end
              2: begin cr[n] = -wr[n]; ci[n] = -wi[n]; end
              default: begin cr[n] = -wi[n]; ci[n] = wr[n]; end
            endcase
          for (int q = 0; q < NW; q++) begin re_q[q] = 0; im_q[q] = 0; end
          for (int n = 0; n < 4; n++)
            for (int i = 0; i < MW; i++)
              for (int j = 0; j < MW; j++) begin
                re_q[i+j] += dig(xr[n], i) * dig(cr[n], j) - dig(xi[n], i) * dig(ci[n], j);
                im_q[i+j] += dig(xr[n], i) * dig(ci[n], j) + dig(xi[n], i) * dig(cr[n], j);
              end
          vre = 0; vim = 0;
          for (int q = 0; q < NW; q++) begin
            vre += longint'(wrap105(re_q[q])) <<< q;
            vim += longint'(wrap105(im_q[q])) <<< q;
          end
          q_re.push_back(vre >>> S); q_im.push_back(vim >>> S); q_k.push_back(k);
        end
      end
      @(posedge clk);
    end
    in_valid = 0;
    repeat (15) @(posedge clk);
    @(negedge clk);
    checks++;
    if (q_re.size() != 0) begin failures++; $display("FAIL %0d outputs missing", q_re.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
