// pd82_sine_rom: one-cycle sine lookup with per-quadrant enables.
//
// The table stores one quarter of a sine wave, 256 unsigned 8-bit samples
// T[i] = floor(255 * sin(i * pi / 510)), computed here at elaboration time. A 10-bit
// phase index selects a quadrant with its top two bits; the second and fourth quadrants
// read the table mirrored (index inverted), and the third and fourth quadrants return
// the negated sample, so the output is a full signed 9-bit sine in -255..+255. This
// is the document's table and quadrant scheme. The document's own listing forms the
// negative half as "1 & sample" (sample - 256) rather than a true negation; this design
// negates, so that the output is the sine the operator formula calls for.
//
// wavemode enables each quadrant: bit 3 enables phase 0-255, bit 2 256-511,
// bit 1 512-767 and bit 0 768-1023. A disabled quadrant reads zero, as the document
// specifies for the WaveMode register.
//
// Timing: address and mode are sampled on the rising clock edge while en is high;
// data is valid after that edge (one cycle read latency). en low holds data.
module pd82_sine_rom (
  input  logic              clk,
  input  logic              en,
  input  logic [3:0]        mode,
  input  logic [9:0]        addr,
  output logic signed [8:0] data
);

  typedef logic [7:0] quarter_t [256];

  function automatic quarter_t make_quarter();
    quarter_t t;
    for (int i = 0; i < 256; i++)
      t[i] = 8'($rtoi($floor(255.0 * $sin(real'(i) * 3.14159265358979323846 / 510.0))));
    return t;
  endfunction

  localparam quarter_t QUARTER = make_quarter();

  logic [1:0] quadrant;
  logic [7:0] index;
  logic [7:0] sample;
  logic signed [8:0] value;

  always_comb begin
    quadrant = addr[9:8];
    // Rising quadrants read forward, falling ones read mirrored.
    index  = quadrant[0] ? ~addr[7:0] : addr[7:0];
    sample = QUARTER[index];
    if (!mode[3 - quadrant])
      value = '0;
    else if (quadrant[1])
      value = -$signed({1'b0, sample});
    else
      value = $signed({1'b0, sample});
  end

  always_ff @(posedge clk)
    if (en) data <= value;

endmodule
