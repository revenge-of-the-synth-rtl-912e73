// adsr_envelope: attack / decay / sustain / release envelope of one voice.
//
// A "scaler" from 0 to 2047 sets the amplitude of the voice. When the gate
// (the note's button) rises, the scaler climbs linearly to 2047 (attack),
// then falls linearly to the sustain level (decay) and stays there
// (sustain). When the gate falls, from any phase, it falls linearly to 0
// (release) and the envelope goes idle. A new press during release starts
// the attack again from the present scaler value.
//
// Each ramp moves the scaler by one step of 1 every `*_rate` clock cycles
// (0 behaves like 1), so a full ramp lasts about 2047 * rate cycles.
//
// The output is the input sample scaled around the zero level 1024:
//   signal_out = 1024 + ((signal_in - 1024) * scaler) >>> 11
// so a scaler of 0 gives silence (1024) and 2047 passes the input almost
// unchanged. `active` is high whenever the scaler is not idle, i.e. from
// the cycle after the gate rises until the release reaches 0.
//
// Timing: the state and scaler are registered; signal_out is combinational
// from them and from signal_in. `rst` is synchronous, active high.
//
// From the document: the four phases, a scaler that rises to its maximum,
// settles at the sustain value and is released to zero, the 11-bit scaler
// and signals, and the output centred on 1024. The linear ramps, the rate
// inputs and the retrigger behaviour are this design's choices.
module adsr_envelope
  import synth_pkg::*;
#(
  parameter int unsigned RATE_W = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              gate,
  input  logic [RATE_W-1:0] attack_rate,
  input  logic [RATE_W-1:0] decay_rate,
  input  sample_t           sustain_level,
  input  logic [RATE_W-1:0] release_rate,
  input  sample_t           signal_in,
  output sample_t           scaler,
  output sample_t           signal_out,
  output logic              active
);

  typedef enum logic [2:0] {IDLE, ATTACK, DECAY, SUSTAIN, RELEASE} adsr_state_t;

  localparam sample_t FULL = '1;

  adsr_state_t       state;
  logic [RATE_W-1:0] rate_count;
  logic [RATE_W-1:0] rate;
  logic              step;

  always_comb begin
    unique case (state)
      ATTACK:  rate = attack_rate;
      DECAY:   rate = decay_rate;
      RELEASE: rate = release_rate;
      default: rate = '0;
    endcase
    step = (RATE_W'(rate_count + 1'b1) >= rate);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= IDLE;
      scaler     <= '0;
      rate_count <= '0;
    end else begin
      rate_count <= step ? '0 : rate_count + 1'b1;
      unique case (state)
        IDLE: begin
          rate_count <= '0;
          if (gate) state <= ATTACK;
        end
        ATTACK: begin
          if (!gate) begin
            state      <= RELEASE;
            rate_count <= '0;
          end else if (scaler == FULL) begin
            state      <= DECAY;
            rate_count <= '0;
          end else if (step) begin
            scaler <= scaler + 1'b1;
          end
        end
        DECAY: begin
          if (!gate) begin
            state      <= RELEASE;
            rate_count <= '0;
          end else if (scaler <= sustain_level) begin
            state      <= SUSTAIN;
          end else if (step) begin
            scaler <= scaler - 1'b1;
          end
        end
        SUSTAIN: begin
          rate_count <= '0;
          if (!gate) state <= RELEASE;
        end
        RELEASE: begin
          if (gate) begin
            state      <= ATTACK;
            rate_count <= '0;
          end else if (scaler == '0) begin
            state      <= IDLE;
          end else if (step) begin
            scaler <= scaler - 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign active = (state != IDLE);

  // Scale the signed deviation from the zero level by scaler / 2048.
  logic signed [SAMPLE_W:0]     deviation;
  logic signed [2*SAMPLE_W+1:0] product;

  always_comb begin
    deviation  = $signed({1'b0, signal_in}) - $signed((SAMPLE_W+1)'(MID));
    product    = deviation * $signed({1'b0, scaler});
    signal_out = sample_t'($signed((SAMPLE_W+1)'(MID)) + (SAMPLE_W+1)'(product >>> SAMPLE_W));
  end

endmodule
