// clock_prescaler: clock controller of the timer.
//
// A free-running 10-bit counter divides the system clock; tick is a one-cycle
// enable for the timer at the rate chosen by sel (AVR clock-select codes):
// 0 stopped, 1 every clock, 2 every 8th, 3 every 64th, 4 every 256th,
// 5 every 1024th clock; 6 and 7 stopped. The ratios are this design's choice.
module clock_prescaler (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] sel,
  output logic       tick
);

  logic [9:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt_q <= '0;
    else        cnt_q <= cnt_q + 1'b1;
  end

  always_comb begin
    unique case (sel)
      3'd1:    tick = 1'b1;
      3'd2:    tick = &cnt_q[2:0];
      3'd3:    tick = &cnt_q[5:0];
      3'd4:    tick = &cnt_q[7:0];
      3'd5:    tick = &cnt_q[9:0];
      default: tick = 1'b0;
    endcase
  end

endmodule
