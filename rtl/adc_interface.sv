// adc_interface: read-out of the two eight-bit phase-current converters.
//
// On `start` the interface pulses the convert-start line for CONV_PULSE clocks, waits
// CONV_WAIT clocks for the conversion, then holds the read strobe for READ_CLKS clocks and
// latches both converters' data at its end. The converters' offset-binary codes
// (128 = zero current) are returned as signed values. `done` strobes when ia/ib are valid,
// CONV_PULSE + CONV_WAIT + READ_CLKS + 1 = 42 clocks after `start` with the defaults,
// matching the 42 clocks the current controller allows for acquiring current and position.
// Only the converter type (eight-bit AD7821) is given; the strobe sequence, the
// polarities (active high here) and the wait times are this design's choices.
module adc_interface #(
  parameter int unsigned CONV_PULSE = 3,
  parameter int unsigned CONV_WAIT  = 35,
  parameter int unsigned READ_CLKS  = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [7:0]        adc_a_data,
  input  logic [7:0]        adc_b_data,
  output logic              adc_convst,
  output logic              adc_rd,
  output logic signed [7:0] ia,
  output logic signed [7:0] ib,
  output logic              done
);
  typedef enum logic [1:0] {A_IDLE, A_CONV, A_WAIT, A_READ} astate_e;
  astate_e     st;
  logic [7:0]  cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= A_IDLE; cnt <= '0;
      adc_convst <= 1'b0; adc_rd <= 1'b0;
      ia <= '0; ib <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        A_IDLE: if (start) begin
          st <= A_CONV; cnt <= '0; adc_convst <= 1'b1;
        end
        A_CONV: if (cnt == 8'(CONV_PULSE - 1)) begin
          st <= A_WAIT; cnt <= '0; adc_convst <= 1'b0;
        end else cnt <= cnt + 1'b1;
        A_WAIT: if (cnt == 8'(CONV_WAIT - 1)) begin
          st <= A_READ; cnt <= '0; adc_rd <= 1'b1;
        end else cnt <= cnt + 1'b1;
        A_READ: if (cnt == 8'(READ_CLKS - 1)) begin
          st <= A_IDLE; adc_rd <= 1'b0; done <= 1'b1;
          ia <= $signed(adc_a_data ^ 8'h80);
          ib <= $signed(adc_b_data ^ 8'h80);
        end else cnt <= cnt + 1'b1;
        default: st <= A_IDLE;
      endcase
    end
  end
endmodule
