// fp_div: IEEE 754 single-precision divider, one quotient bit per clock.
//
// The exponent difference is formed at once; the 24-bit significands are divided by
// restoring long division, 27 quotient bits (one integer bit, 23 fraction bits, guard
// bits) and a remainder for the sticky bit; the quotient is normalised (it lies in
// (0.5, 2)) and rounded to nearest even. `done` strobes 29 clocks after `start`; a
// `start` while busy is ignored. Division by zero gives infinity, a zero dividend zero,
// subnormal operands count as zero and results outside the normal range are flushed.
module fp_div (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        done,
  output logic [31:0] y
);
  typedef enum logic [1:0] {D_IDLE, D_RUN, D_PACK} dstate_e;
  dstate_e            st;
  logic [4:0]         it;
  logic [25:0]        r;
  logic [23:0]        mb;
  logic [26:0]        q;
  logic               sgn, zero_a, zero_b;
  logic signed [10:0] e;

  // normalise and round the finished quotient
  logic [23:0]        m_tr;
  logic               g, st_b, rnd;
  logic [24:0]        m_rnd;
  logic signed [10:0] e_n, e_f;
  always_comb begin
    if (q[26]) begin
      m_tr = q[26:3]; g = q[2]; st_b = (|q[1:0]) | (r != '0); e_n = e;
    end else begin
      m_tr = q[25:2]; g = q[1]; st_b = q[0] | (r != '0);     e_n = e - 11'sd1;
    end
    rnd   = g & (st_b | m_tr[0]);
    m_rnd = {1'b0, m_tr} + 25'(rnd);
    e_f   = m_rnd[24] ? e_n + 11'sd1 : e_n;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= D_IDLE; it <= '0; r <= '0; mb <= '0; q <= '0;
      sgn <= 1'b0; zero_a <= 1'b0; zero_b <= 1'b0; e <= '0;
      done <= 1'b0; y <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        D_IDLE: if (start) begin
          sgn    <= a[31] ^ b[31];
          zero_a <= (a[30:23] == 8'd0);
          zero_b <= (b[30:23] == 8'd0);
          e      <= $signed({3'b0, a[30:23]}) - $signed({3'b0, b[30:23]}) + 11'sd127;
          r      <= {2'b0, 1'b1, a[22:0]};
          mb     <= {1'b1, b[22:0]};
          q      <= '0;
          it     <= '0;
          st     <= D_RUN;
        end
        D_RUN: begin
          if (r >= {2'b0, mb}) begin
            q <= {q[25:0], 1'b1};
            r <= (r - {2'b0, mb}) << 1;
          end else begin
            q <= {q[25:0], 1'b0};
            r <= r << 1;
          end
          it <= it + 1'b1;
          if (it == 5'd26) st <= D_PACK;
        end
        D_PACK: begin
          st   <= D_IDLE;
          done <= 1'b1;
          if (zero_a && !zero_b)           y <= {sgn, 31'd0};
          else if (zero_b || e_f > 11'sd254) y <= {sgn, 8'hff, 23'd0};
          else if (e_f < 11'sd1)           y <= {sgn, 31'd0};
          else                             y <= {sgn, e_f[7:0], m_rnd[24] ? m_rnd[23:1] : m_rnd[22:0]};
        end
        default: st <= D_IDLE;
      endcase
    end
  end
endmodule
