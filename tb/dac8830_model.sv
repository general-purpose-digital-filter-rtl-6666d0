// dac8830_model -- behavioural model of the 16-bit voltage-output DAC on the
// filter board, for simulation only (not synthesizable).
//
// SPI slave: while CS is low, SDI is shifted in on SCLK rising edges, most
// significant bit first. The rising edge of CS loads the last 16 bits into
// the output latch if exactly 16 were clocked; a frame of any other length is
// counted in bad_frames and ignored. dac_log[f] holds the code latched by
// frame f (frames counted from 1); code is the latched value.
module dac8830_model (
  input  logic        cs_n,
  input  logic        sclk,
  input  logic        sdi,
  output logic [15:0] code
);

  logic [15:0] sh;
  int          nbits;
  int          frame;
  int          bad_frames;
  int          dac_log [int];

  initial begin
    sh = '0; code = '0; nbits = 0; frame = 0; bad_frames = 0;
  end

  always @(negedge cs_n) begin
    frame = frame + 1;
    nbits = 0;
  end

  always @(posedge sclk) if (!cs_n) begin
    sh    = {sh[14:0], sdi};
    nbits = nbits + 1;
  end

  always @(posedge cs_n) if (frame > 0) begin
    if (nbits == 16) begin
      code           = sh;
      dac_log[frame] = int'(sh);
    end else begin
      bad_frames = bad_frames + 1;
    end
  end

endmodule
