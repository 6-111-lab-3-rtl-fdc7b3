// ac97commands: endless sequence of AC97 codec register writes.
//
// The codec needs its input selector, gains and volumes set before it passes
// microphone audio to the ADCs and PCM data to the headphones. This block
// offers one register write per AC97 frame, stepping to the next entry of a
// six-entry table on every rising edge of 'ready' and starting over after the
// last, so the codec is (re)configured continuously and recovers by itself
// from a codec reset. The table:
//   02h master volume      0000h   0 dB, unmuted
//   04h headphone volume   0000h   0 dB, unmuted
//   0Eh microphone volume  0048h   +20 dB boost (bit 6), 0 dB gain, unmuted
//   18h PCM output volume  0808h   0 dB both channels, unmuted
//   1Ah record select      0000h   microphone on both ADC channels
//   1Ch record gain        0000h   0 dB, unmuted
//
// Interface: clocked by the AC97 bit clock; 'ready' is the frame ready level
// from the ac97 controller. 'command' changes on the bit-clock edge after
// ready rises, well before the controller captures it at the next frame start;
// 'command_valid' is high whenever the block is out of reset.
// The specification states what the sequence achieves (microphone selected,
// gains set) and that it repeats; the register addresses and the +20 dB boost
// bit are printed on the codec block diagram; the record-select address and
// all the data values follow the AC'97 register map and are this design's.
module ac97commands
  import voice_pkg::*;
(
  input  logic      clk,            // AC97 bit clock
  input  logic      reset,
  input  logic      ready,
  output ac97_cmd_t command,
  output logic      command_valid
);

  localparam int unsigned N_CMDS = 6;

  logic [2:0] index;
  logic       ready_d;

  always_comb begin
    unique case (index)
      3'd0:    command = '{addr: REG_MASTER_VOL,    data: 16'h0000};
      3'd1:    command = '{addr: REG_HEADPHONE_VOL, data: 16'h0000};
      3'd2:    command = '{addr: REG_MIC_VOL,       data: 16'h0048};
      3'd3:    command = '{addr: REG_PCM_OUT_VOL,   data: 16'h0808};
      3'd4:    command = '{addr: REG_RECORD_SEL,    data: 16'h0000};
      default: command = '{addr: REG_RECORD_GAIN,   data: 16'h0000};
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      index         <= '0;
      ready_d       <= 1'b0;
      command_valid <= 1'b0;
    end else begin
      ready_d       <= ready;
      command_valid <= 1'b1;
      if (ready && !ready_d)
        index <= (index == 3'(N_CMDS - 1)) ? 3'd0 : index + 3'd1;
    end
  end

endmodule
