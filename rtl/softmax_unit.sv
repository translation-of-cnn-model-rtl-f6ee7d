// softmax_unit: fixed-point softmax over the class scores held in the feature
// buffer (the network's last layer before the result is reported).
//
// Scores are signed 8-bit values x_i with FRAC fraction bits (value x_i/2^FRAC).
// The unit makes three passes over the N scores, reading one byte per cycle
// from the feature buffer:
//   1. find the maximum m;
//   2. sum e_i = 2^16 * exp(-(m - x_i)/2^FRAC), computed as 2^-t with
//      t = (m - x_i) * log2(e) / 2^FRAC in 16-bit fixed point: the fraction of t
//      indexes a 256-entry table of 2^(-k/256) (built at elaboration), the
//      integer part of t is a right shift;
//   3. after one reciprocal R = 2^40 / sum, found by a 41-step restoring
//      division, emit p_i = round(e_i * R / 2^32) saturated to 255, that is the
//      probability in units of 1/256.
// Subtracting the maximum keeps every e_i in (0, 2^16], so no overflow occurs
// for up to 2047 scores. Pass 3 honours stall like the rest of the pipeline: the
// read, the pending result and out_valid freeze while stall is high. done pulses
// once after the last probability has been taken. Latency: about 3N + 45 cycles
// without stalls. The softmax layer itself follows the network description; the
// fixed-point method, the 8-bit probability format and the FRAC field are this
// design's choices.
module softmax_unit #(
  parameter int unsigned AW = 11
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [10:0]   n,          // number of scores, >= 1
  input  logic [4:0]    frac,       // fraction bits of the scores
  input  logic          stall,
  output logic          re,
  output logic [AW-1:0] raddr,
  input  logic [7:0]    rdata,
  output logic          out_valid,
  output logic [7:0]    out_byte,
  output logic          done,
  output logic          busy
);
  typedef logic [16:0] pow_tab_t [256];

  // 2^16 * 2^(-k/256), rounded
  function automatic pow_tab_t mk_pow2();
    pow_tab_t t;
    for (int k = 0; k < 256; k++)
      t[k] = 17'($rtoi(65536.0 * $pow(2.0, -real'(k) / 256.0) + 0.5));
    return t;
  endfunction

  localparam pow_tab_t POW2 = mk_pow2();
  localparam logic [16:0] LOG2E_Q16 = 17'd94548;    // log2(e) * 2^16

  typedef enum logic [2:0] {P_IDLE, P_MAX, P_SUM, P_DIV, P_EMIT, P_DONE} phase_e;
  phase_e phase;

  logic [10:0]        idx;
  logic               rd_q;          // a read was issued last cycle (passes 1, 2)
  logic               last_q;        // ... and it was the last one
  logic signed [7:0]  mx;
  logic [27:0]        sum;
  logic [40:0]        rem;
  logic [40:0]        quo;
  logic [5:0]         dstep;
  logic [26:0]        recip;
  logic               em_v, em_last; // pass 3: read issued, result due
  logic               em_done_q;     // pass 3: the last result is on out_valid
  logic [41:0]        r2;
  logic [40:0]        r_next, q_next;

  // e = 2^16 * exp(-(mx - x)/2^frac)
  logic signed [7:0]  x;
  logic [8:0]         d;
  logic [25:0]        t_raw;
  logic [25:0]        t_q16;
  logic [16:0]        e;

  assign x     = $signed(rdata);
  assign d     = 9'($signed({mx[7], mx}) - $signed({x[7], x}));
  assign t_raw = 26'(d) * 26'(LOG2E_Q16);
  assign t_q16 = t_raw >> frac;
  assign e     = (t_q16[25:16] > 10'd16) ? 17'd0 : (POW2[t_q16[15:8]] >> t_q16[25:16]);

  // pass 3 result
  logic [43:0] prod;
  logic [12:0] p_round;
  assign prod    = 44'(e) * 44'(recip);
  assign p_round = 13'((prod + 44'h0_8000_0000) >> 32);

  // one step of the restoring division; the dividend 2^40 is a single 1 bit
  always_comb begin
    r2 = {rem, (dstep == 6'd0)};
    if (r2 >= 42'(sum)) begin
      r_next = 41'(r2 - 42'(sum));
      q_next = {quo[39:0], 1'b1};
    end else begin
      r_next = 41'(r2);
      q_next = {quo[39:0], 1'b0};
    end
  end

  assign raddr = AW'(idx);
  assign busy  = (phase != P_IDLE);

  always_comb begin
    re = 1'b0;
    unique case (phase)
      P_MAX, P_SUM: re = (idx < n);
      P_EMIT:       re = (idx < n) && !stall;
      default:      re = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      phase     <= P_IDLE;
      idx       <= '0;
      rd_q      <= 1'b0;
      last_q    <= 1'b0;
      mx        <= '0;
      sum       <= '0;
      rem       <= '0;
      quo       <= '0;
      dstep     <= '0;
      recip     <= '0;
      em_v      <= 1'b0;
      em_last   <= 1'b0;
      out_valid <= 1'b0;
      out_byte  <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (phase)
        P_IDLE: if (start) begin
          phase <= P_MAX;
          idx   <= '0;
          rd_q  <= 1'b0;
          mx    <= 8'sh80;
        end
        P_MAX, P_SUM: begin
          rd_q   <= re;
          last_q <= re && (idx == n - 11'd1);
          if (re) idx <= idx + 11'd1;
          if (rd_q) begin
            if (phase == P_MAX) begin
              if (x > mx) mx <= x;
            end else begin
              sum <= sum + 28'(e);
            end
          end
          if (rd_q && last_q) begin
            idx  <= '0;
            rd_q <= 1'b0;
            if (phase == P_MAX) begin
              phase <= P_SUM;
              sum   <= '0;
            end else begin
              phase <= P_DIV;
              rem   <= '0;
              quo   <= '0;
              dstep <= '0;
            end
          end
        end
        P_DIV: begin
          // restoring division of 2^40 by sum, one quotient bit per cycle
          rem   <= r_next;
          quo   <= q_next;
          dstep <= dstep + 6'd1;
          if (dstep == 6'd40) begin
            recip <= 27'(q_next);
            phase <= P_EMIT;
            idx   <= '0;
            em_v  <= 1'b0;
          end
        end
        P_EMIT: if (!stall) begin
          em_v    <= re;
          em_last <= re && (idx == n - 11'd1);
          if (re) idx <= idx + 11'd1;
          out_valid <= em_v;
          if (em_v) out_byte <= (p_round > 13'd255) ? 8'd255 : p_round[7:0];
          if (out_valid && em_done_q) begin
            phase     <= P_DONE;
            out_valid <= 1'b0;
          end
        end
        P_DONE: begin
          done  <= 1'b1;
          phase <= P_IDLE;
        end
        default: phase <= P_IDLE;
      endcase
    end
  end

  // the last result is on out_valid
  always_ff @(posedge clk) begin
    if (rst)                                 em_done_q <= 1'b0;
    else if (phase != P_EMIT)                em_done_q <= 1'b0;
    else if (!stall && em_v && em_last)      em_done_q <= 1'b1;
  end

endmodule
