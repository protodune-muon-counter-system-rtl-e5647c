// maroc_adc_model: behavioural model, for testbenches only, of the parts of a
// PMT board outside the FPGA that the readout talks to: the Maroc2 read
// multiplexer and the external 12-bit ADC. r_clk with r_d = 1 selects channel
// 0, each further r_clk the next channel. On each convert clock the ADC
// returns value(board, channel) = (board*1000 + channel*37 + 11) mod 4096,
// and holds it until the next conversion. It counts R-clocks and convert
// clocks and records whether each conversion happened while hold was high.
module maroc_adc_model #(
  parameter int BOARD = 0
) (
  input  logic        clk,
  input  logic        hold,
  input  logic        r_clk,
  input  logic        r_d,
  input  logic        adc_conv,
  output logic [11:0] adc_data
);
  int mux = 0;
  int n_rclk = 0, n_conv = 0, n_conv_unheld = 0;

  function automatic logic [11:0] value(int ch);
    return 12'((BOARD * 1000 + ch * 37 + 11) % 4096);
  endfunction

  initial adc_data = '0;

  always @(posedge clk) begin
    if (r_clk) begin
      mux = r_d ? 0 : mux + 1;
      n_rclk++;
    end
    if (adc_conv) begin
      adc_data <= value(mux);
      n_conv++;
      if (!hold) n_conv_unheld++;
    end
  end
endmodule
