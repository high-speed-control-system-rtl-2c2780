// sigma_modulator: receiving end of a sigma-delta channel.
//
// The up/down determine unit decodes each received two-bit code (01 = up, 11 = down,
// 00 = hold, and the never-sent 10 = hold) and the up/down counter moves its n-bit value
// by one quantum STEP, rebuilding the transmitter's word: value(k) = value(k-1) + STEP*u_q(k).
// A compensation receiver may add a signed correction through corr_valid/corr_delta; it is
// added in the same clock as any code (this port is this design's way of letting the
// compensation channel replace the rebuilt value).
//
// Interface: code_valid is a one-clock strobe with `code`; `value` updates on the next
// clock edge.
module sigma_modulator
  import sd_pkg::*;
#(
  parameter int unsigned W    = 32,
  parameter int unsigned STEP = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                code_valid,
  input  logic [1:0]          code,
  input  logic                corr_valid,
  input  logic signed [W-1:0] corr_delta,
  output logic signed [W-1:0] value
);
  logic up, down, ena;
  logic signed [W-1:0] stepv, corr;

  // up/down determine unit
  assign up   = code_valid && (code == SD_UP);
  assign down = code_valid && (code == SD_DOWN);
  assign ena  = up | down;

  assign stepv = !ena ? '0 : (up ? W'(STEP) : -W'(STEP));
  assign corr  = corr_valid ? corr_delta : '0;

  always_ff @(posedge clk) begin
    if (!rst_n) value <= '0;
    else if (ena || corr_valid) value <= value + stepv + corr;
  end
endmodule
