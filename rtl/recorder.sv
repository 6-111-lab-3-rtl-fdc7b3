// recorder: record 6 kHz audio into a sample memory and play it back at 48 kHz.
//
// The audio wrapper delivers one 8-bit sample per rising edge of 'ready'
// (48 kHz). The recorder keeps only every eighth sample, a 6 kHz stream, so
// the 64K-word memory holds about 10.9 s of sound.
//
// Record mode (playback = 0). Entering it clears the memory address, the
// highest-written address and the 1-of-8 phase counter. On each ready rise the
// phase counter advances; on phase 0 the incoming sample is written at the
// current address, the address is recorded as the highest written and the
// address steps on. When the address reaches the end of memory, recording
// stops (the memory is full) unless 'replay' is set: then it wraps to 0 and
// keeps overwriting the oldest samples, so the memory always holds the last
// 2^ADDR_W samples (instant replay). While recording, the incoming sample is
// looped back to to_ac97_data so the user can hear the microphone.
//
// Playback mode (playback = 1). Entering it sets the address to the oldest
// stored sample (0, or after a replay wrap the address just past the newest)
// and reads the first two samples into s1 (older) and s2 (newer). On ready
// rise number i (i = 0..7) of each group of eight, to_ac97_data becomes s1
// when 'filter' is 0 (each 6 kHz sample repeated eight times) or
// ((8-i)*s1 + i*s2) >>> 3 when 'filter' is 1 (linear interpolation). After
// the eighth, s1 takes s2 and the next stored sample is read into s2. After
// the highest address written the address goes back to the oldest sample, so
// the recording plays in an endless loop.
//
// Test mode (test_mode = 1) reproduces a bring-up check of the audio path:
// playback sends a 750 Hz tone, record mode loops the microphone back, and
// nothing is written to memory.
//
// Memory interface: a single-port synchronous RAM with one clock of read
// latency (bram_64kx8). A read takes two clocks (address, then data); the
// fetch after the eighth ready rise completes hundreds of clocks before the
// next one (a ready period is about 562 clocks at 27 MHz).
// Timing: to_ac97_data changes on the clock edge after the one at which
// 'ready' is first seen high. All ports are synchronous to clock_27mhz.
//
// From the specification: the ports listed for this module, 6 kHz storage of
// every eighth sample, resetting the address on entering either mode,
// tracking the highest address written, looping playback, the replication and
// interpolation rules, the switch that selects the interpolator, and the
// optional instant replay. This design's own choices: stopping when the
// memory is full outside replay mode, the microphone loop-back while
// recording, keeping the supplied tone/loop-back behaviour as a test mode,
// and the memory-port and fetch timing.
module recorder
  import voice_pkg::*;
#(
  parameter int unsigned ADDR_W = 16     // memory address width: 64K samples
) (
  input  logic              clock_27mhz,
  input  logic              reset,
  input  logic              playback,        // 1 playback, 0 record
  input  logic              ready,           // rises when a new sample is available
  input  sample_t           from_ac97_data,  // microphone sample
  output sample_t           to_ac97_data,    // headphone sample
  input  logic              filter,          // 1: interpolate on playback
  input  logic              replay,          // 1: record continuously, play the newest 2^ADDR_W samples
  input  logic              test_mode,       // 1: tone on playback, loop-back on record
  // sample memory
  output logic [ADDR_W-1:0] mem_addr,
  output logic              mem_we,
  output sample_t           mem_din,
  input  sample_t           mem_dout
);

  typedef enum logic [1:0] {
    RECORD,      // record mode
    FETCH_ADDR,  // playback: address presented to the memory
    FETCH_DATA,  // playback: read data available
    PLAY         // playback: producing samples
  } state_t;

  state_t            state;
  logic              playback_d;
  logic              ready_d;
  logic              ready_rise;
  logic              mode_entry;
  logic [2:0]        phase;          // position within a group of eight samples
  logic [ADDR_W-1:0] addr;           // memory pointer
  logic [ADDR_W-1:0] last_addr;      // highest address written
  logic [ADDR_W-1:0] start_addr;     // oldest stored sample
  logic [ADDR_W-1:0] next_addr;
  logic              wrapped;        // replay recording has wrapped around
  logic              full;           // memory full, recording stopped
  logic              prime;          // one more fetch needed after this one
  sample_t           s1, s2;
  sample_t           interp;
  logic signed [19:0] tone;

  assign ready_rise = ready && !ready_d;
  assign mode_entry = (playback != playback_d);
  assign next_addr  = (addr == last_addr) ? start_addr : addr + 1'b1;

  interpolator u_interp (
    .s1   (s1),
    .s2   (s2),
    .step (phase),
    .y    (interp)
  );

  tone750hz u_tone (
    .clk      (clock_27mhz),
    .reset    (reset),
    .ready    (ready_rise),
    .pcm_data (tone)
  );

  // memory port: writes happen in record mode on phase 0 of a ready rise
  assign mem_addr = addr;
  assign mem_din  = from_ac97_data;
  assign mem_we   = (state == RECORD) && !mode_entry && ready_rise && (phase == 3'd0)
                    && !full && !test_mode;

  always_ff @(posedge clock_27mhz) begin
    if (reset || mode_entry) begin
      playback_d <= playback;
      ready_d    <= ready;
      phase      <= '0;
      // playback starts at the oldest sample: after a replay wrap that is
      // the slot the next write would have used, otherwise address 0
      addr       <= (playback && replay && wrapped) ? addr : '0;
      prime      <= 1'b1;
      if (reset) begin
        to_ac97_data <= '0;
        s1           <= '0;
        s2           <= '0;
      end
      if (playback) begin
        state      <= FETCH_ADDR;
        start_addr <= (replay && wrapped) ? addr : '0;
        if (reset) begin
          last_addr <= '0;
          wrapped   <= 1'b0;
          full      <= 1'b0;
        end
      end else begin
        state      <= RECORD;
        start_addr <= '0;
        last_addr  <= '0;
        wrapped    <= 1'b0;
        full       <= 1'b0;
      end
    end else begin
      ready_d <= ready;

      // memory pointer and playback fetches
      unique case (state)
        RECORD: begin
          if (mem_we) begin
            last_addr <= addr;
            addr      <= addr + 1'b1;
            if (addr == '1) begin
              if (replay) wrapped <= 1'b1;
              else        full    <= 1'b1;
            end
          end
        end
        FETCH_ADDR: state <= FETCH_DATA;
        FETCH_DATA: begin
          s1    <= s2;
          s2    <= mem_dout;
          addr  <= next_addr;
          prime <= 1'b0;
          state <= prime ? FETCH_ADDR : PLAY;
        end
        PLAY: begin
          if (ready_rise && phase == 3'd7 && !test_mode) state <= FETCH_ADDR;
        end
        default: state <= RECORD;
      endcase

      // outgoing sample, once per ready rise
      if (ready_rise) begin
        phase <= phase + 3'd1;
        if (test_mode)
          to_ac97_data <= playback ? sample_t'(tone[19 -: 8]) : from_ac97_data;
        else if (state == RECORD)
          to_ac97_data <= from_ac97_data;
        else
          to_ac97_data <= filter ? interp : s1;
      end
    end
  end

endmodule
