// ads8681_model -- behavioural model of the 16-bit SAR ADC on the filter
// board, for simulation only (not synthesizable).
//
// SPI slave, mode 0, 32-bit frames. Each frame shifts a command in on SDI
// (sampled on SCLK rising edges) and shifts the previous conversion result out
// on SDO. The result is launched on SCLK falling edges starting with the first
// one, so a mode-0 master sampling on rising edges finds it one bit late, in
// bits 30..15 of the 32-bit word it receives. The rising edge of CS ends the
// frame: the analog input is sampled and converted, then a complete
// "WRITE" command (opcode 1101000, 9-bit address, 16-bit data) to the input
// range register 0x14 takes effect for later conversions.
//
// Conversion: vin_uv is the input voltage in microvolts. Range code 0x0B is
// unipolar 0 .. 5.12 V, straight binary; the power-up range 0x00 is bipolar
// +-12.288 V, offset binary. Results clip at the ends of the range.
// conv_log[f] holds the code converted at the end of frame f (frames counted
// from 1), range_writes counts accepted range writes.
module ads8681_model (
  input  logic cs_n,
  input  logic sclk,
  input  logic sdi,
  output logic sdo,
  input  int   vin_uv
);

  logic [31:0] cmd;
  logic [15:0] result;       // last conversion, sent in the next frame
  logic [16:0] out_sh;
  logic [3:0]  range_sel;
  int          nbits;
  int          frame;
  int          range_writes;
  int          conv_log [int];

  initial begin
    cmd = '0; result = '0; out_sh = '0; range_sel = 4'h0;
    nbits = 0; frame = 0; range_writes = 0; sdo = 1'b0;
  end

  function automatic logic [15:0] convert(int uv, logic [3:0] rs);
    longint c;
    if (rs == 4'hB) c = (longint'(uv) * 65536) / 5_120_000;
    else            c = ((longint'(uv) + 12_288_000) * 65536) / 24_576_000;
    if (c < 0)     c = 0;
    if (c > 65535) c = 65535;
    return 16'(c);
  endfunction

  always @(negedge cs_n) begin
    frame  = frame + 1;
    nbits  = 0;
    out_sh = {1'b0, result};
    sdo    = 1'b0;
  end

  always @(posedge sclk) if (!cs_n) begin
    cmd   = {cmd[30:0], sdi};
    nbits = nbits + 1;
  end

  always @(negedge sclk) if (!cs_n) begin
    out_sh = {out_sh[15:0], 1'b0};
    sdo    = out_sh[16];
  end

  always @(posedge cs_n) if (frame > 0) begin
    result          = convert(vin_uv, range_sel);
    conv_log[frame] = int'(result);
    if (nbits == 32 && cmd[31:25] == 7'b1101000 && cmd[24:16] == 9'h014) begin
      range_sel    = cmd[3:0];
      range_writes = range_writes + 1;
    end
    sdo = 1'b0;
  end

endmodule
