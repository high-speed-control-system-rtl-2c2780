// delta_modulator: three-level delta modulator of one sigma-delta channel.
//
// At each sampling strobe the comparator compares the input word with the value held in
// the flip-flop and emits +1, 0 or -1 (Eq. u_q = sign of the change, with a dead zone of
// one quantum STEP), coded on two bits as 01, 00 and 11. The flip-flop then moves by the
// same quantum, so it always holds exactly what the far-end sigma modulator rebuilds.
// While the input changes by at most STEP per sample this is the same as latching the
// input itself; when it changes faster the held value follows at one STEP per sample
// instead of losing the remainder for good (this tracking form is this design's reading
// of the flip-flop/comparator pair).
//
// Interface: `sample` is a one-clock strobe; `code`/`code_valid` appear one clock later.
// `track` is the value the receiver should hold after applying `code`; the compensation
// channel sends its low bits. `load` forces the held value (used at start-up).
module delta_modulator
  import sd_pkg::*;
#(
  parameter int unsigned W    = 32,
  parameter int unsigned STEP = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                sample,
  input  logic signed [W-1:0] data_in,
  input  logic                load,
  input  logic signed [W-1:0] load_value,
  output sd_code_e            code,
  output logic                code_valid,
  output logic signed [W-1:0] track
);
  localparam logic signed [W:0] Q = (W+1)'(STEP);
  logic signed [W:0] diff;

  assign diff = {data_in[W-1], data_in} - {track[W-1], track};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      track      <= '0;
      code       <= SD_ZERO;
      code_valid <= 1'b0;
    end else begin
      code_valid <= sample;
      if (load) begin
        track <= load_value;
      end else if (sample) begin
        if (diff >= Q) begin
          code  <= SD_UP;
          track <= track + W'(STEP);
        end else if (diff <= -Q) begin
          code  <= SD_DOWN;
          track <= track - W'(STEP);
        end else begin
          code  <= SD_ZERO;
        end
      end
    end
  end
endmodule
