// tone750hz: 20-bit PCM sine wave, 750 Hz when played at 48 kHz.
//
// 48 kHz / 750 Hz = 64 samples per period, so a 6-bit phase counter advances
// by one on every 'ready' strobe and a quarter-wave table of 17 points gives
// the sample: point k is round(524287 * sin(2*pi*k/64)), k = 0..16, and the
// other three quarters follow by mirroring the index and negating. Output is
// two's complement with full-scale amplitude 2^19-1.
//
// Interface: 'ready' is a one-clock strobe (one per audio sample); pcm_data
// changes on the clock edge after the strobe and holds until the next one.
// The 20-bit width and 750 Hz frequency are the specification's; the table
// method and the phase counter are this design's.
module tone750hz (
  input  logic               clk,
  input  logic               reset,
  input  logic               ready,      // advance to the next sample
  output logic signed [19:0] pcm_data
);

  logic [5:0] phase;
  logic [4:0] qidx;        // 0..16 into the quarter table
  logic [18:0] mag;

  always_comb begin
    // quarter 0: k, quarter 1: 16-k', quarter 2: k', quarter 3: 16-k'
    qidx = phase[4] ? 5'd16 - {1'b0, phase[3:0]} : {1'b0, phase[3:0]};
    unique case (qidx)
      5'd0:  mag = 19'd0;
      5'd1:  mag = 19'd51389;
      5'd2:  mag = 19'd102283;
      5'd3:  mag = 19'd152192;
      5'd4:  mag = 19'd200636;
      5'd5:  mag = 19'd247147;
      5'd6:  mag = 19'd291278;
      5'd7:  mag = 19'd332604;
      5'd8:  mag = 19'd370727;
      5'd9:  mag = 19'd405279;
      5'd10: mag = 19'd435929;
      5'd11: mag = 19'd462380;
      5'd12: mag = 19'd484378;
      5'd13: mag = 19'd501711;
      5'd14: mag = 19'd514213;
      5'd15: mag = 19'd521762;
      default: mag = 19'd524287;
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      phase    <= '0;
      pcm_data <= '0;
    end else if (ready) begin
      phase    <= phase + 6'd1;
      pcm_data <= phase[5] ? -$signed({1'b0, mag}) : $signed({1'b0, mag});
    end
  end

endmodule
