// ecg_avg - oversampling averager between the SAR ADC and the wavelet filter.
//
// The ADC converts four times per processor sample. This block adds OSR
// consecutive IN_W-bit codes; with OSR = 4 the sum of four 10-bit codes is
// exactly 12 bits wide, which is the processor's input width, so the sum
// itself (four times the mean) is the output and no bits are dropped.
// The ADC codes are taken as offset binary; inverting the MSB of the sum
// subtracts mid-scale and gives a two's complement sample.
//
// Interface: in_valid/in_code from the ADC; out_valid pulses for one clock
// with out_sample, the clock after the OSR-th code of a group arrives.
// The 4x oversampling and the 10b -> 12b widths follow the description;
// offset-binary coding and summing instead of dividing are choices here.
module ecg_avg #(
  parameter int unsigned IN_W  = 10,
  parameter int unsigned OSR   = 4,
  parameter int unsigned OUT_W = IN_W + $clog2(OSR)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [IN_W-1:0]         in_code,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_sample
);

  localparam int unsigned CNT_W = (OSR > 1) ? $clog2(OSR) : 1;

  logic [CNT_W-1:0] cnt;
  logic [OUT_W-1:0] acc;
  logic [OUT_W-1:0] sum;

  assign sum = acc + OUT_W'(in_code);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt        <= '0;
      acc        <= '0;
      out_valid  <= 1'b0;
      out_sample <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (cnt == CNT_W'(OSR - 1)) begin
          cnt        <= '0;
          acc        <= '0;
          out_valid  <= 1'b1;
          // offset binary -> two's complement: flip the sign bit
          out_sample <= signed'({~sum[OUT_W-1], sum[OUT_W-2:0]});
        end else begin
          cnt <= cnt + 1'b1;
          acc <= sum;
        end
      end
    end
  end

endmodule
