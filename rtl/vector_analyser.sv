// vector_analyser: vector analyser (VA).
//
// Gives the magnitude and the direction of a space phasor:
//   |g| = sqrt(gd^2 + gq^2),  sin a = gq / |g|,  cos a = gd / |g|
// In the controller it analyses the rotor flux: |g| feeds the flux
// controller and sin/cos orient the coordinate transformation.
//
// How it works: two multipliers and an adder form gd^2 + gq^2 in the start
// cycle. A bit-serial square root (two radicand bits per clock, 16 clocks)
// gives |g| (floor). Two bit-serial restoring dividers then run side by side,
// one quotient bit per clock for 15 clocks, to form |gq|/|g| and |gd|/|g|
// (floor), and the signs are applied at the end. The squares, the sum and
// the square-root-then-divide order follow the original; the bit-serial
// square root and dividers are this design's choice (the original used
// vendor cores that are not described).
//
// Interface: Q2.13 per-unit words; sin/cos use 8192 for 1.0. A 'start'
// pulse while not busy takes g_dq at a clock edge; 'done' and the results
// are set at the 31st clock edge after that one (16 square-root steps, 15
// divider steps), and mag/sin_a/cos_a are held until the next result.
// sin/cos are exact to a few LSB plus a relative 1/|g| (|g| in LSB), i.e.
// about 1e-4 for a rated flux of 1 pu. 'start' while busy is ignored. A zero phasor
// gives mag = 0, cos = 1, sin = 0. mag saturates at 32767.
module vector_analyser
  import foc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  dq_t  g_dq,
  output pu_t  mag,
  output pu_t  sin_a,
  output pu_t  cos_a,
  output logic busy,
  output logic done
);

  typedef enum logic [1:0] {S_IDLE, S_SQRT, S_DIV} state_t;

  state_t      state;
  logic [4:0]  cnt;
  logic [31:0] rad;        // radicand, shifted out two bits per step
  logic [17:0] rem;        // square-root partial remainder (< 2*root+1)
  logic [16:0] root;       // square-root result
  logic [15:0] abs_d, abs_q;
  logic        neg_d, neg_q;
  logic [30:0] rd, rq;     // divider remainders
  logic [15:0] qd, qq;     // quotients

  // next square-root step
  logic [19:0] rem_sh, trial;
  always_comb begin
    rem_sh = {rem, rad[31:30]};
    trial  = {1'b0, root, 2'b01};
  end

  // divider step: compare with the divisor shifted to the current bit
  logic [30:0] dsh;
  always_comb dsh = 31'(root) << cnt;

  // final quotients, including the last bit decided in the current step
  logic [15:0] fd, fq;
  always_comb begin
    fd = qd | ((root != 0 && rd >= dsh) ? 16'd1 : 16'd0);
    fq = qq | ((root != 0 && rq >= dsh) ? 16'd1 : 16'd0);
  end

  function automatic logic [15:0] abs16(input pu_t x);
    return (x < 0) ? 16'(-32'(x)) : 16'(x);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      rad   <= '0;
      rem   <= '0;
      root  <= '0;
      abs_d <= '0;
      abs_q <= '0;
      neg_d <= 1'b0;
      neg_q <= 1'b0;
      rd    <= '0;
      rq    <= '0;
      qd    <= '0;
      qq    <= '0;
      mag   <= '0;
      sin_a <= '0;
      cos_a <= PU_ONE;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          abs_d <= abs16(g_dq.d);
          abs_q <= abs16(g_dq.q);
          neg_d <= g_dq.d < 0;
          neg_q <= g_dq.q < 0;
          rad   <= 32'(32'(abs16(g_dq.d)) * 32'(abs16(g_dq.d)))
                 + 32'(32'(abs16(g_dq.q)) * 32'(abs16(g_dq.q)));
          rem   <= '0;
          root  <= '0;
          cnt   <= 5'd15;
          state <= S_SQRT;
        end
        S_SQRT: begin
          rad <= rad << 2;
          if (rem_sh >= trial) begin
            rem  <= 18'(rem_sh - trial);
            root <= {root[15:0], 1'b1};
          end else begin
            rem  <= 18'(rem_sh);
            root <= {root[15:0], 1'b0};
          end
          if (cnt == 0) begin
            cnt   <= 5'd14;
            rd    <= 31'(abs_d) << FRAC;
            rq    <= 31'(abs_q) << FRAC;
            qd    <= '0;
            qq    <= '0;
            state <= S_DIV;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        S_DIV: begin
          if (root != 0 && rd >= dsh) begin
            rd <= rd - dsh;
            qd[cnt[3:0]] <= 1'b1;
          end
          if (root != 0 && rq >= dsh) begin
            rq <= rq - dsh;
            qq[cnt[3:0]] <= 1'b1;
          end
          if (cnt == 0) state <= S_IDLE;
          else          cnt   <= cnt - 1'b1;
        end
        default: state <= S_IDLE;
      endcase

      // publish the result one cycle after the last divider step
      if (state == S_DIV && cnt == 0) begin
        mag <= (root > 17'd32767) ? PU_MAX : pu_t'(root[15:0]);
        if (root == 0) begin
          cos_a <= PU_ONE;
          sin_a <= '0;
        end else begin
          cos_a <= neg_d ? -pu_t'(fd) : pu_t'(fd);
          sin_a <= neg_q ? -pu_t'(fq) : pu_t'(fq);
        end
        done <= 1'b1;
      end
    end
  end

  assign busy = (state != S_IDLE);

endmodule
