// Behavioural model of the AK4565 codec's serial audio port for simulation.
//
// ADC side: on the falling bclk that comes with the falling lrclk, the
// model presents bit 15 of adc_sample on
// sdto0 and then one lower bit on every falling bclk while lrclk is 0
// (MSB first, 16 bits, changing on the falling edge so that the receiver
// samples on the rising one). adc_sample is read at the frame start.
// DAC side: on every rising bclk while lrclk is 0 the model shifts sdti in;
// when lrclk rises the 16 collected bits appear on dac_word and dac_frames
// counts up. Control port: while csn is 0 it shifts cdti in on every
// rising cclk; when csn rises it reports the word on ctrl_word and counts
// it in ctrl_words (a rise of csn with no bits
// before it is not a word).
module ak4565_model (
  input  logic        bclk,
  input  logic        lrclk,
  input  logic        sdti,
  output logic        sdto0,
  input  logic        csn,
  input  logic        cclk,
  input  logic        cdti,
  input  logic [15:0] adc_sample,
  output logic [15:0] dac_word,
  output int unsigned dac_frames,
  output logic [15:0] ctrl_word,
  output int unsigned ctrl_words,
  output int unsigned ctrl_bits
);

  logic [15:0] adc_word, dac_shift, ctrl_shift;
  int          idx;

  initial begin
    sdto0      = 1'b0;
    dac_word   = '0;
    dac_frames = 0;
    ctrl_word  = '0;
    ctrl_words = 0;
    ctrl_bits  = 0;
    idx        = 0;
    adc_word   = '0;
    dac_shift  = '0;
    ctrl_shift = '0;
  end

  // lrclk and bclk change together at the frame edge, so the frame start
  // is detected on the falling bclk from the lrclk value seen at the
  // previous falling bclk
  logic lr_last = 1'b1;
  always @(negedge bclk) begin
    if (!lrclk && lr_last) begin
      adc_word = adc_sample;
      idx      = 15;
      sdto0   <= adc_sample[15];
    end else if (!lrclk && idx > 0) begin
      idx    = idx - 1;
      sdto0 <= adc_word[idx];
    end
    lr_last = lrclk;
  end

  always @(posedge bclk) begin
    if (!lrclk) dac_shift <= {dac_shift[14:0], sdti};
  end

  always @(posedge lrclk) begin
    dac_word   <= dac_shift;
    dac_frames <= dac_frames + 1;
  end

  always @(posedge cclk) begin
    if (!csn) begin
      ctrl_shift <= {ctrl_shift[14:0], cdti};
      ctrl_bits  <= ctrl_bits + 1;
    end
  end

  // a word ends when csn rises after at least one bit
  int unsigned bits_at_word = 0;
  always @(posedge csn) begin
    if (ctrl_bits != bits_at_word) begin
      ctrl_word    <= ctrl_shift;
      ctrl_words   <= ctrl_words + 1;
      bits_at_word <= ctrl_bits;
    end
  end

endmodule
