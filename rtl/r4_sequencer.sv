// r4_sequencer: operand sequencing for the time-multiplexed radix-4 element.
//
// A radix-4 butterfly (decimation in time, twiddles applied at the inputs)
// computes X_k = sum_n (w_n x_n) (-j)^(n k), k = 0..3. In the MRRNS datapath
// every output must be a single layer of products, so each output k is formed
// as one 4-term inner product of the data x_n with combined coefficients
// c_{n,k} = w_n (-j)^(n k mod 4). Multiplying a sign-magnitude complex number
// by a power of -j only swaps real and imaginary parts and flips signs, which
// is all this block does to the twiddles. One computational element is shared
// by the four outputs: a butterfly is accepted, held, and issued on four
// consecutive clocks (k = 0,1,2,3); a new butterfly may be accepted while
// k = 3 is issued, so back-to-back butterflies run without a gap.
// Interface: valid/ready on the input (a butterfly is taken when both are 1);
// issue_valid/issue_k qualify the held data and the coefficients on the
// outputs. Reset (active low, synchronous) empties the sequencer.
module r4_sequencer #(
  parameter int MW = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic [3:0]          x_re_sgn,
  input  logic [3:0][MW-1:0]  x_re_mag,
  input  logic [3:0]          x_im_sgn,
  input  logic [3:0][MW-1:0]  x_im_mag,
  input  logic [3:0]          w_re_sgn,
  input  logic [3:0][MW-1:0]  w_re_mag,
  input  logic [3:0]          w_im_sgn,
  input  logic [3:0][MW-1:0]  w_im_mag,
  output logic                issue_valid,
  output logic [1:0]          issue_k,
  output logic [3:0]          d_re_sgn,
  output logic [3:0][MW-1:0]  d_re_mag,
  output logic [3:0]          d_im_sgn,
  output logic [3:0][MW-1:0]  d_im_mag,
  output logic [3:0]          c_re_sgn,
  output logic [3:0][MW-1:0]  c_re_mag,
  output logic [3:0]          c_im_sgn,
  output logic [3:0][MW-1:0]  c_im_mag
);

  logic                busy;
  logic [1:0]          k;
  logic [3:0]          t_re_sgn, t_im_sgn;
  logic [3:0][MW-1:0]  t_re_mag, t_im_mag;

  assign in_ready    = !busy || (k == 2'd3);
  assign issue_valid = busy;
  assign issue_k     = k;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      k    <= '0;
    end else if (in_valid && in_ready) begin
      busy     <= 1'b1;
      k        <= '0;
      d_re_sgn <= x_re_sgn;
      d_re_mag <= x_re_mag;
      d_im_sgn <= x_im_sgn;
      d_im_mag <= x_im_mag;
      t_re_sgn <= w_re_sgn;
      t_re_mag <= w_re_mag;
      t_im_sgn <= w_im_sgn;
      t_im_mag <= w_im_mag;
    end else if (busy) begin
      k <= k + 2'd1;
      if (k == 2'd3) busy <= 1'b0;
    end
  end

  // A butterfly is issued as k = 0, 1, 2, 3 on consecutive clocks, without a gap.
  a_issue_order: assert property (@(posedge clk) disable iff (!rst_n)
    issue_valid && issue_k != 2'd3 |=> issue_valid && issue_k == $past(issue_k) + 2'd1);
  // A butterfly is accepted only when the sequencer can take it.
  a_accept: assert property (@(posedge clk) disable iff (!rst_n)
    busy && issue_k != 2'd3 |-> !in_ready);

  // Rotate twiddle n by (-j)^(n*k).
  always_comb begin
    for (int n = 0; n < 4; n++) begin
      logic [1:0] r;
      r = 2'(n * int'(k));
      case (r)
        2'd0: begin
          c_re_sgn[n] = t_re_sgn[n];  c_re_mag[n] = t_re_mag[n];
          c_im_sgn[n] = t_im_sgn[n];  c_im_mag[n] = t_im_mag[n];
        end
        2'd1: begin   // -j (a + jb) = b - ja
          c_re_sgn[n] = t_im_sgn[n];  c_re_mag[n] = t_im_mag[n];
          c_im_sgn[n] = !t_re_sgn[n]; c_im_mag[n] = t_re_mag[n];
        end
        2'd2: begin   // -(a + jb)
          c_re_sgn[n] = !t_re_sgn[n]; c_re_mag[n] = t_re_mag[n];
          c_im_sgn[n] = !t_im_sgn[n]; c_im_mag[n] = t_im_mag[n];
        end
        default: begin // j (a + jb) = -b + ja
          c_re_sgn[n] = !t_im_sgn[n]; c_re_mag[n] = t_im_mag[n];
          c_im_sgn[n] = t_re_sgn[n];  c_im_mag[n] = t_re_mag[n];
        end
      endcase
    end
  end

endmodule
