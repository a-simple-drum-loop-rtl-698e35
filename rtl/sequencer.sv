// Drum loop recorder and sequencer: the control side of the drum machine.
//
// The user chooses one of NUM_CH channels with the up/down buttons (the
// number wraps around) and a mode with the play/record switch, then starts
// and stops with the start/stop button. Each channel holds CH_LEN commands
// in a sequence_store; a command is the set of drums struck together and the
// number of timer ticks (seq_timer, 51.2 us at 20 MHz) since the previous
// command.
//
//   Idle       the drum buttons are passed straight to `triggers`, so the
//              user hears every hit.
//   Record     start/stop first clears the channel, then every new press of
//              the drum buttons waits HOLD_CYCLES (so that buttons struck
//              together are caught as one hit), then stores the drum mask
//              and the elapsed time, restarts the timer and drives the mask
//              on `triggers` until the buttons are released. A timer
//              overflow stores an empty command with the full wait 0xFFFF,
//              which keeps long pauses. Recording stops by start/stop or
//              when the channel is full.
//   Play       waits until the timer reaches the wait of the current
//              command, then drives its drum mask on `triggers` for
//              HOLD_CYCLES, restarts the timer and moves on; after the last
//              command it goes back to the first, so the sequence loops
//              until start/stop is pressed. Empty commands (wait 0, no
//              drums) fire at once, so a short recording loops right after
//              its last hit.
// A channel button (which also restarts the timer), a change of the mode
// switch or start/stop while active returns to Idle at the start of the
// channel. After reset the whole store
// is cleared, one word per clock, before the buttons are served.
//
// `led_record` (red) is on in record mode and `led_active` (green) while
// recording or playing; `channel` is the selected channel number.
//
// The modes, the command format, the clear-on-record, the loop, the
// overflow filler, the 1024-clock timer tick and the 3 x 25 storage follow
// the original recorder, which ran this control as firmware on a
// microcontroller. Doing it as a state machine, the debouncers, clearing
// the store after reset, handling overflows only while active and the hold
// time of 40000 clocks (2 ms) are this design's choices.
module sequencer
  import drum_pkg::*;
#(
  parameter int unsigned NUM_CH          = 3,       // storage channels
  parameter int unsigned CH_LEN          = 25,      // commands per channel
  parameter int unsigned TIMER_PRESCALE  = 1024,    // clocks per timer tick
  parameter int unsigned HOLD_CYCLES     = 40_000,  // trigger hold / gather
  parameter int unsigned DEBOUNCE_CYCLES = 40_000   // button debounce
) (
  input  logic                      clk,
  input  logic                      rst,           // synchronous, active high
  input  drum_mask_t                drum_btn,      // raw drum buttons
  input  logic                      start_stop_btn,
  input  logic                      ch_up_btn,
  input  logic                      ch_down_btn,
  input  logic                      play_mode_sw,  // 1 = play, 0 = record
  output drum_mask_t                triggers,      // to the synthesizer
  output logic                      led_record,
  output logic                      led_active,
  output logic [$clog2(NUM_CH)-1:0] channel
);

  localparam int DEPTH  = NUM_CH * CH_LEN;
  localparam int ADDR_W = $clog2(DEPTH);
  localparam int IDX_W  = $clog2(CH_LEN + 1);
  localparam int CH_W   = $clog2(NUM_CH);
  localparam int HOLD_W = $clog2(HOLD_CYCLES + 1);

  typedef enum logic [2:0] {
    S_INIT, S_IDLE, S_CLEAR, S_PLAY, S_PLAY_HOLD, S_REC, S_REC_GATHER
  } seq_state_t;

  seq_state_t         state;
  logic [IDX_W-1:0]   idx;        // position within the channel
  logic [ADDR_W-1:0]  init_addr;  // position of the power-up clear
  logic [HOLD_W-1:0]  hold;
  drum_mask_t         last;       // drums held at the last stored hit
  drum_mask_t         drums_s1, drums;
  logic               mode_q;     // mode last acted on

  logic               start_press, up_press, down_press, mode_level;
  logic               timer_clear, overflow;
  logic [TIMER_W-1:0] elapsed;

  logic               we;
  logic [ADDR_W-1:0]  addr;
  seq_cmd_t           wdata, rdata;

  logic               at_end, hold_done, active;

  button_sync #(.DEBOUNCE_CYCLES(DEBOUNCE_CYCLES)) u_start (
    .clk(clk), .rst(rst), .btn_in(start_stop_btn), .level(), .press(start_press));
  button_sync #(.DEBOUNCE_CYCLES(DEBOUNCE_CYCLES)) u_up (
    .clk(clk), .rst(rst), .btn_in(ch_up_btn), .level(), .press(up_press));
  button_sync #(.DEBOUNCE_CYCLES(DEBOUNCE_CYCLES)) u_down (
    .clk(clk), .rst(rst), .btn_in(ch_down_btn), .level(), .press(down_press));
  button_sync #(.DEBOUNCE_CYCLES(DEBOUNCE_CYCLES)) u_mode (
    .clk(clk), .rst(rst), .btn_in(play_mode_sw), .level(mode_level), .press());

  seq_timer #(.PRESCALE(TIMER_PRESCALE)) u_timer (
    .clk(clk), .rst(rst), .clear(timer_clear), .count(elapsed), .overflow(overflow));

  sequence_store #(.DEPTH(DEPTH), .ADDR_W(ADDR_W)) u_store (
    .clk(clk), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata));

  assign at_end    = (idx == IDX_W'(CH_LEN));
  assign hold_done = (hold == HOLD_W'(HOLD_CYCLES - 1));
  assign active    = (state != S_INIT) && (state != S_IDLE);

  // Word address: the channel base plus the position (kept in range when
  // the position has run past the last command).
  assign addr = (state == S_INIT) ? init_addr
              : ADDR_W'(channel * CH_LEN) + (at_end ? '0 : ADDR_W'(idx));

  // Store writes and timer restarts, decided from the same conditions as
  // the state register below.
  always_comb begin
    we          = 1'b0;
    wdata       = '0;
    timer_clear = 1'b0;
    if (state == S_INIT) begin
      we = 1'b1;
    end else if (up_press || down_press) begin
      timer_clear = 1'b1;
    end else if (mode_level != mode_q) begin
      // nothing stored
    end else if (start_press) begin
      timer_clear = 1'b1;
    end else begin
      unique case (state)
        S_CLEAR: we = 1'b1;
        S_PLAY:
          if (!at_end && !overflow && elapsed >= rdata.timer) timer_clear = 1'b1;
        S_REC:
          if (!at_end && overflow) begin
            we    = 1'b1;
            wdata = '{drum_id: '0, timer: '1};
          end
        S_REC_GATHER:
          if (hold_done) begin
            we          = 1'b1;
            wdata       = '{drum_id: drums, timer: elapsed};
            timer_clear = 1'b1;
          end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_INIT;
      init_addr <= '0;
      idx       <= '0;
      hold      <= '0;
      last      <= '0;
      channel   <= '0;
      triggers  <= '0;
      mode_q    <= 1'b0;
      drums_s1  <= '0;
      drums     <= '0;
    end else begin
      drums_s1 <= drum_btn;
      drums    <= drums_s1;

      if (state == S_INIT) begin
        init_addr <= init_addr + 1'b1;
        if (init_addr == ADDR_W'(DEPTH - 1)) state <= S_IDLE;
      end else if (up_press || down_press) begin
        if (up_press)
          channel <= (channel == CH_W'(NUM_CH - 1)) ? '0 : channel + 1'b1;
        else
          channel <= (channel == '0) ? CH_W'(NUM_CH - 1) : channel - 1'b1;
        state <= S_IDLE;
        idx   <= '0;
      end else if (mode_level != mode_q) begin
        mode_q   <= mode_level;
        triggers <= '0;
        state    <= S_IDLE;
        idx      <= '0;
      end else if (start_press) begin
        idx  <= '0;
        last <= '0;
        if (active)          state <= S_IDLE;
        else if (mode_level) state <= S_PLAY;
        else                 state <= S_CLEAR;
        triggers <= '0;
      end else begin
        unique case (state)
          S_IDLE: triggers <= drums;

          S_CLEAR: begin
            if (idx == IDX_W'(CH_LEN - 1)) begin
              idx   <= '0;
              state <= S_REC;
            end else begin
              idx <= idx + 1'b1;
            end
          end

          S_PLAY: begin
            if (at_end) begin
              triggers <= '0;
              idx      <= '0;
            end else if (overflow) begin
              idx <= idx + 1'b1;
            end else if (elapsed >= rdata.timer) begin
              triggers <= rdata.drum_id;
              idx      <= idx + 1'b1;
              hold     <= '0;
              state    <= S_PLAY_HOLD;
            end else begin
              triggers <= '0;
            end
          end

          S_PLAY_HOLD: begin
            hold <= hold + 1'b1;
            if (hold_done) state <= S_PLAY;
          end

          S_REC: begin
            if (at_end) begin
              triggers <= '0;
              idx      <= '0;
              state    <= S_IDLE;
            end else if (overflow) begin
              idx <= idx + 1'b1;
            end else if (last == '0 && drums != '0) begin
              hold  <= '0;
              state <= S_REC_GATHER;
            end else if (last != '0 && drums == '0) begin
              last     <= '0;
              triggers <= '0;
            end
          end

          S_REC_GATHER: begin
            hold <= hold + 1'b1;
            if (hold_done) begin
              triggers <= drums;
              last     <= drums;
              idx      <= idx + 1'b1;
              state    <= S_REC;
            end
          end

          default: state <= S_IDLE;
        endcase
      end
    end
  end

  // Every store access stays inside the store.
  a_addr_in_range: assert property (@(posedge clk) disable iff (rst) addr < ADDR_W'(DEPTH))
    else $error("sequencer: store address %0d beyond %0d words", addr, DEPTH);

  // Recording and playback never step past the end of the channel.
  a_idx_in_range: assert property (@(posedge clk) disable iff (rst) idx <= IDX_W'(CH_LEN))
    else $error("sequencer: position %0d beyond the channel", idx);

  assign led_record = ~mode_level;
  assign led_active = active;

endmodule
