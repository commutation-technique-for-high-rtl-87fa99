// sine_reference: line-frequency sinusoidal modulation function.
//
// A PW-bit phase accumulator advances by round(F_LINE * 2^PW / CLK_HZ) every
// clock. Its top LW bits address a 2^LW-entry full-wave sine
// table (Q1.15, computed at elaboration with sin(2*pi*k/2^LW)), and the
// table value is multiplied by the modulation index m_index (Q1.15, 0..1).
// The output m is the modulation function fed to the sawtooth PWM; the PWM
// builds the second, 180-degree shifted function itself by negation.
// Output is registered (two clocks from phase to m). The line frequency,
// table size and number formats are choices of this design.
module sine_reference #(
  parameter int unsigned CLK_HZ = 20_000_000,
  parameter int unsigned F_LINE = 60,
  parameter int unsigned PW     = 32,  // phase accumulator width
  parameter int unsigned LW     = 8    // log2 of the sine table size
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic        [15:0] m_index,  // Q1.15 modulation index
  output logic signed [15:0] m,        // Q1.15 modulation function
  output logic               cycle_start
);

  localparam int unsigned TS = 2**LW;
  localparam longint unsigned STEP =
    ((longint'(F_LINE) << PW) + longint'(CLK_HZ) / 2) / longint'(CLK_HZ);

  typedef logic signed [15:0] table_t [TS];

  function automatic table_t make_table();
    table_t t;
    for (int k = 0; k < TS; k++)
      t[k] = 16'($rtoi($floor(32767.0 * $sin(2.0 * 3.14159265358979 * k / TS) + 0.5)));
    return t;
  endfunction

  localparam table_t SINE = make_table();

  logic [PW-1:0]        phase;
  logic signed [15:0]   s;
  logic signed [32:0]   prod;

  assign prod = s * $signed({1'b0, m_index});

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase <= '0; s <= '0; m <= '0; cycle_start <= 1'b0;
    end else begin
      phase       <= phase + PW'(STEP);
      cycle_start <= (phase + PW'(STEP)) < phase;  // accumulator wrapped
      s           <= SINE[phase[PW-1 -: LW]];
      m           <= 16'(prod >>> 15);
    end
  end

endmodule
