// av_pkg: types and constants shared by the audio visualizer's FPGA logic.
//
// The sample path carries two 12-bit conversions packed as two 16-bit
// fields of a 32-bit word (channel 0 in the upper half), exactly as they
// arrive on the converter's serial output: four leading zeros, then the 12
// result bits.  The FIFO keeps only the lower half (channel 1) and stores it
// with a 4-bit sample number, giving a 20-bit entry.  The display link
// writes 9-bit words: a byte for the panel plus a command flag in bit 8.
// The field layouts follow the original design; the type names are this design's.
package av_pkg;

  // ---- converter side -------------------------------------------------
  localparam int ADC_BITS      = 12;  // converter resolution
  localparam int ADC_FRAME     = 16;  // sclk periods per conversion frame
  localparam int ADC_CHANNELS  = 2;   // IN0 and IN1 are read
  localparam int ADC_CHAN_BITS = 3;   // width of the channel-select field

  // one 16-bit serial frame as it arrives on the converter output
  typedef logic [ADC_FRAME-1:0] adc_frame_t;

  // the packed pair of frames handed to the FIFO
  typedef struct packed {
    adc_frame_t ch0;   // bits 31:16
    adc_frame_t ch1;   // bits 15:0
  } adc_pair_t;

  // ---- FIFO side ------------------------------------------------------
  localparam int FIFO_DEPTH     = 16;
  localparam int FIFO_TAG_BITS  = 4;
  localparam int FIFO_DATA_BITS = 16;

  typedef struct packed {
    logic [FIFO_TAG_BITS-1:0]  tag;     // sample number, bits 19:16
    logic [FIFO_DATA_BITS-1:0] sample;  // the sample, bits 15:0
  } fifo_entry_t;

  // ---- display side ---------------------------------------------------
  // Avalon-MM write word of the display SPI master.
  typedef struct packed {
    logic [22:0] unused;
    logic        command;  // bit 8: 1 = command byte (D/C low), 0 = pixel/data byte
    logic [7:0]  data;     // bits 7:0: byte shifted out MSB first
  } spi_word_t;

endpackage
