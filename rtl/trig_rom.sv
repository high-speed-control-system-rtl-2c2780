// trig_rom: trigonometric function generator.
//
// A 12-bit angle address (4096 steps per electrical revolution, produced from the motor
// counter) selects a sine and a cosine sample of 10 bits (signed, amplitude 511). Only a
// quarter wave, 1024 words of sin(2*pi*(i + 0.5)/4096) * 511 rounded to the nearest
// integer, is stored; the other quarters come from mirroring the address and negating the
// data, and the cosine is read as the sine a quarter turn ahead. The half-step offset
// keeps the mirrored quarters exact. The table is computed at elaboration, no data file
// is needed. Registered output: data is valid one clock after the address.
// The 12-bit address and 10-bit data follow the design; the quarter-wave storage is this
// design's choice.
module trig_rom (
  input  logic              clk,
  input  logic [11:0]       addr,
  output logic signed [9:0] sin_o,
  output logic signed [9:0] cos_o
);
  typedef logic [8:0] qtab_t [1024];

  function automatic qtab_t make_table();
    qtab_t t;
    for (int i = 0; i < 1024; i++)
      t[i] = 9'($rtoi($sin(2.0 * 3.14159265358979 * (real'(i) + 0.5) / 4096.0) * 511.0 + 0.5));
    return t;
  endfunction

  localparam qtab_t QTAB = make_table();

  function automatic logic signed [9:0] lookup(input logic [11:0] a);
    logic [9:0] idx;
    logic [8:0] mag;
    idx = a[10] ? ~a[9:0] : a[9:0];       // mirror in the 2nd and 4th quarter
    mag = QTAB[idx];
    return a[11] ? -$signed({1'b0, mag}) : $signed({1'b0, mag});
  endfunction

  logic [11:0] addr_c;
  assign addr_c = addr + 12'd1024;

  always_ff @(posedge clk) begin
    sin_o <= lookup(addr);
    cos_o <= lookup(addr_c);
  end
endmodule
