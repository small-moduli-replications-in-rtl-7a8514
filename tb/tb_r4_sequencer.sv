// tb_r4_sequencer: offers random butterflies, sometimes back to back and
// sometimes after idle gaps, and checks that each accepted butterfly is issued
// on four consecutive clocks as k = 0..3 with its data held, that in_ready is
// low during k = 0..2, and that coefficient n of output k equals the twiddle
// times (-j)^(n*k), computed here with signed complex integer arithmetic.
module tb_r4_sequencer;
  localparam int MW = 16;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, in_valid, in_ready, issue_valid;
  logic [1:0] issue_k;
  logic [3:0] x_re_sgn, x_im_sgn, w_re_sgn, w_im_sgn;
  logic [3:0][MW-1:0] x_re_mag, x_im_mag, w_re_mag, w_im_mag;
  logic [3:0] d_re_sgn, d_im_sgn, c_re_sgn, c_im_sgn;
  logic [3:0][MW-1:0] d_re_mag, d_im_mag, c_re_mag, c_im_mag;
  int checks = 0, failures = 0;
  int n_back2back = 0, n_gap = 0;

  r4_sequencer #(.MW(MW)) dut (.*);

  function automatic int sm(logic s, logic [MW-1:0] m);
    return s ? -int'(m) : int'(m);
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected butterflies in issue order.
  int exp_xr[$], exp_xi[$], exp_wr[$], exp_wi[$];
  int cur_xr[4], cur_xi[4], cur_wr[4], cur_wi[4];
  int next_k = 0;

  initial begin
    rst_n = 0; in_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1200; t++) begin
      @(negedge clk);
      // Check what is issued in this clock.
      if (issue_valid) begin
        if (next_k == 0) begin
          for (int n = 0; n < 4; n++) begin
            cur_xr[n] = exp_xr.pop_front(); cur_xi[n] = exp_xi.pop_front();
            cur_wr[n] = exp_wr.pop_front(); cur_wi[n] = exp_wi.pop_front();
          end
        end
        checks++;
        if (int'(issue_k) != next_k) begin failures++; $display("FAIL k=%0d exp=%0d", issue_k, next_k); end
        checks++;
        if (in_ready != (issue_k == 2'd3)) begin failures++; $display("FAIL in_ready at k=%0d", issue_k); end
        for (int n = 0; n < 4; n++) begin
          int er, ei, r;
          r = (n * next_k) % 4;
          case (r)
            0: begin er =  cur_wr[n]; ei =  cur_wi[n]; end
            1: begin er =  cur_wi[n]; ei = -cur_wr[n]; end
            2: begin er = -cur_wr[n]; ei = -cur_wi[n]; end
            default: begin er = -cur_wi[n]; ei = cur_wr[n]; end
          endcase
          checks += 3;
          if (sm(c_re_sgn[n], c_re_mag[n]) != er || sm(c_im_sgn[n], c_im_mag[n]) != ei) begin
            failures++; $display("FAIL coef n=%0d k=%0d", n, next_k);
          end
          if (sm(d_re_sgn[n], d_re_mag[n]) != cur_xr[n]) begin failures++; $display("FAIL data re n=%0d", n); end
          if (sm(d_im_sgn[n], d_im_mag[n]) != cur_xi[n]) begin failures++; $display("FAIL data im n=%0d", n); end
        end
        next_k = (next_k + 1) % 4;
      end else begin
        checks++;
        if (!in_ready) begin failures++; $display("FAIL not ready while idle"); end
        if (next_k != 0) begin failures++; $display("FAIL issue stopped early"); end
      end
      // Offer a new butterfly most of the time.
      in_valid = ($urandom_range(9) < 8);
      for (int n = 0; n < 4; n++) begin
        x_re_sgn[n] = 1'($urandom); x_re_mag[n] = MW'($urandom);
        x_im_sgn[n] = 1'($urandom); x_im_mag[n] = MW'($urandom);
        w_re_sgn[n] = 1'($urandom); w_re_mag[n] = MW'($urandom);
        w_im_sgn[n] = 1'($urandom); w_im_mag[n] = MW'($urandom);
      end
      #1;
      if (in_valid && in_ready) begin
        if (issue_valid) n_back2back++; else n_gap++;
        for (int n = 0; n < 4; n++) begin
          exp_xr.push_back(sm(x_re_sgn[n], x_re_mag[n])); exp_xi.push_back(sm(x_im_sgn[n], x_im_mag[n]));
          exp_wr.push_back(sm(w_re_sgn[n], w_re_mag[n])); exp_wi.push_back(sm(w_im_sgn[n], w_im_mag[n]));
        end
      end
      @(posedge clk);
    end
    checks++;
    if (n_back2back == 0 || n_gap == 0) begin
      failures++;
      $display("FAIL coverage back2back=%0d after_gap=%0d", n_back2back, n_gap);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
