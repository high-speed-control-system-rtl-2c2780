// fp_dot: one row of a floating-point matrix-vector product, y = addend + sum_k c[k]*v[k].
//
// The row owns a float multiplier and a float adder (both 3-stage pipelines). On `start`
// the K products are issued one per clock. Every value that becomes available (the
// addend, each product, each partial sum) enters a small pool; whenever the pool holds two
// values they are sent to the adder together. The sums therefore form a tree shaped by
// arrival times, and the row needs about K + 3*log2(K+1) + 6 clocks. For K = 6 the result
// is ready 19 clocks after `start` (the position controller testbench checks the total).
// `done` strobes for one clock with `y`; operands must stay stable until `done`.
module fp_dot
  import sd_pkg::*;
#(
  parameter int unsigned K = 6
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  fp32_t coef [K],
  input  fp32_t val  [K],
  input  fp32_t addend,
  output logic  done,
  output fp32_t y
);
  localparam int unsigned PS = K + 1;          // pool slots: at most K+1 live values
  localparam int unsigned CW = $clog2(K + 2);

  logic [CW-1:0] mul_idx, adds_back;
  logic          mul_busy;
  logic          mul_ov, add_ov, add_iv;
  fp32_t         mul_y, add_y, add_a, add_b;
  fp32_t         pool   [PS];
  logic [PS-1:0] pvalid;

  fp_mul u_mul (.clk, .rst_n, .in_valid(mul_busy), .a(coef[mul_idx]), .b(val[mul_idx]),
                .out_valid(mul_ov), .y(mul_y));
  fp_add u_add (.clk, .rst_n, .in_valid(add_iv), .sub(1'b0), .a(add_a), .b(add_b),
                .out_valid(add_ov), .y(add_y));

  // pick the two lowest valid pool entries
  int unsigned i0, i1;
  logic        have2;
  always_comb begin
    i0 = 0; i1 = 0; have2 = 1'b0;
    for (int i = PS - 1; i >= 0; i--)
      if (pvalid[i]) begin i1 = i0; i0 = i; end
    have2 = ($countones(pvalid) >= 2);
    add_iv = have2;
    add_a  = pool[i0];
    add_b  = pool[i1];
  end

  // free slots for incoming values (slots popped this clock are not reused until next)
  int unsigned f0, f1;
  always_comb begin
    f0 = 0; f1 = 0;
    for (int i = PS - 1; i >= 0; i--)
      if (!pvalid[i]) begin f1 = f0; f0 = i; end
  end

  logic final_sum;
  assign final_sum = add_ov && (adds_back == CW'(K - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mul_idx   <= '0;
      mul_busy  <= 1'b0;
      adds_back <= '0;
      pvalid    <= '0;
      done      <= 1'b0;
      y         <= '0;
      for (int i = 0; i < PS; i++) pool[i] <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        mul_idx   <= '0;
        mul_busy  <= 1'b1;
        adds_back <= '0;
        pvalid    <= '0;
        pvalid[0] <= 1'b1;
        pool[0]   <= addend;
      end else begin
        if (mul_busy) begin
          if (mul_idx == CW'(K - 1)) mul_busy <= 1'b0;
          else mul_idx <= mul_idx + 1'b1;
        end
        if (have2) begin
          pvalid[i0] <= 1'b0;
          pvalid[i1] <= 1'b0;
        end
        if (add_ov) adds_back <= adds_back + 1'b1;
        if (final_sum) begin
          done <= 1'b1;
          y    <= add_y;
        end
        // new arrivals go to slots free before this clock
        if (mul_ov && add_ov && !final_sum) begin
          pool[f0] <= mul_y;  pvalid[f0] <= 1'b1;
          pool[f1] <= add_y;  pvalid[f1] <= 1'b1;
        end else if (mul_ov) begin
          pool[f0] <= mul_y;  pvalid[f0] <= 1'b1;
        end else if (add_ov && !final_sum) begin
          pool[f0] <= add_y;  pvalid[f0] <= 1'b1;
        end
      end
    end
  end
endmodule
