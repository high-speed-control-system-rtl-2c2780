// serial_rx: receiver of one unidirectional serial channel (serial-to-parallel converter).
//
// Both wires first pass a two-flop synchroniser. While `rts` is inactive the receiver
// idles. Once it sees `rts` active it is armed and watches the data wire, one sample per
// clock (OVERSAMPLE samples per bit). A falling data line is taken as the start of the
// start bit; half a bit later the line is checked again, and if it is no longer low the
// start is rejected and the receiver re-arms. Otherwise each payload bit is read in its
// middle, one bit time apart, least significant bit first. After the last bit `valid`
// strobes for one clock with `payload`, and the receiver waits for `rts` to drop.
//
// Timing: `valid` comes about (1.5 + PAYLOAD) * OVERSAMPLE + 3 clocks after the driver's
// start bit begins. A data error inside the frame is not detected here: the channel code
// and the compensation channel deal with it. Start-bit validation at mid-bit and the
// synchroniser are this design's choices.
module serial_rx #(
  parameter int unsigned PAYLOAD    = 2,
  parameter int unsigned OVERSAMPLE = 5
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               data,
  input  logic               rts,
  output logic [PAYLOAD-1:0] payload,
  output logic               valid
);
  typedef enum logic [2:0] {S_IDLE, S_ARMED, S_START, S_BITS, S_WAIT} state_e;
  localparam int unsigned OW = $clog2(OVERSAMPLE + 1);
  localparam int unsigned BW = $clog2(PAYLOAD + 1);

  state_e             state;
  logic [1:0]         sync_d, sync_r;
  logic               d, r;
  logic [OW-1:0]      os_cnt;
  logic [BW-1:0]      nbits;
  logic [PAYLOAD-1:0] shreg;
  logic [PAYLOAD:0]   shin;      // new bit enters at the top, oldest falls out

  assign shin = {d, shreg};

  assign d = sync_d[1];
  assign r = sync_r[1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sync_d  <= '1;
      sync_r  <= '0;
      state   <= S_IDLE;
      os_cnt  <= '0;
      nbits   <= '0;
      shreg   <= '0;
      payload <= '0;
      valid   <= 1'b0;
    end else begin
      sync_d <= {sync_d[0], data};
      sync_r <= {sync_r[0], rts};
      valid  <= 1'b0;
      unique case (state)
        S_IDLE:  if (r) state <= S_ARMED;
        S_ARMED: begin
          if (!r) state <= S_IDLE;
          else if (!d) begin
            state  <= S_START;
            os_cnt <= '0;
          end
        end
        S_START: begin
          if (os_cnt == OW'(OVERSAMPLE / 2 - 1)) begin
            os_cnt <= '0;
            if (!d) begin
              state <= S_BITS;
              nbits <= '0;
            end else begin
              state <= S_ARMED;
            end
          end else os_cnt <= os_cnt + 1'b1;
        end
        S_BITS: begin
          if (os_cnt == OW'(OVERSAMPLE - 1)) begin
            os_cnt <= '0;
            shreg  <= shin[PAYLOAD:1];
            if (nbits == BW'(PAYLOAD - 1)) begin
              payload <= shin[PAYLOAD:1];
              valid   <= 1'b1;
              state   <= S_WAIT;
            end
            nbits <= nbits + 1'b1;
          end else os_cnt <= os_cnt + 1'b1;
        end
        S_WAIT:  if (!r) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
