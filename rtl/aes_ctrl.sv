// aes_ctrl - sequencer and block handshake shared by the iterative AES
// encryption and decryption cores.
//
// A block is accepted on a clock edge where in_valid && in_ready ('load').
// The controller then spends PRE_CYCLES clocks in a preparation phase
// (decryption uses it to run the key schedule forward to the last round key;
// encryption has none) and NR clocks in the round phase, one AES round per
// clock. 'cnt' numbers the clocks of the current phase from 1, so during the
// round phase it is the AES round number (1..NR). After the last round the
// result is held with out_valid high until out_ready; in that same cycle a
// new block may already be accepted, so with out_ready tied high a block
// completes every PRE_CYCLES + NR + 1 clocks.
//
// Handshake rules: in_valid/in_data and out_valid/out_data follow the usual
// valid/ready protocol (a source keeps valid and data stable until ready).
// Reset is active-low and synchronous to clk; it returns to IDLE.
module aes_ctrl #(
  parameter int unsigned PRE_CYCLES = 0,
  parameter int unsigned NR         = 10
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  output logic       out_valid,
  input  logic       out_ready,
  output logic       load,       // block accepted this clock
  output logic       pre,        // preparation phase active
  output logic       run,        // round phase active
  output logic [3:0] cnt,        // clock number within the phase, from 1
  output logic       last        // last clock of the current phase
);

  typedef enum logic [1:0] {S_IDLE, S_PRE, S_RUN, S_DONE} state_e;
  state_e state_q;
  logic [3:0] cnt_q;

  assign in_ready  = (state_q == S_IDLE) || (state_q == S_DONE && out_ready);
  assign out_valid = (state_q == S_DONE);
  assign load      = in_valid && in_ready;
  assign pre       = (state_q == S_PRE);
  assign run       = (state_q == S_RUN);
  assign cnt       = cnt_q;
  assign last      = (pre && cnt_q == 4'(PRE_CYCLES)) || (run && cnt_q == 4'(NR));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      cnt_q   <= '0;
    end else begin
      unique case (state_q)
        S_IDLE, S_DONE: begin
          if (load) begin
            state_q <= (PRE_CYCLES > 0) ? S_PRE : S_RUN;
            cnt_q   <= 4'd1;
          end else if (state_q == S_DONE && out_ready) begin
            state_q <= S_IDLE;
          end
        end
        S_PRE: begin
          if (last) begin
            state_q <= S_RUN;
            cnt_q   <= 4'd1;
          end else begin
            cnt_q   <= cnt_q + 4'd1;
          end
        end
        S_RUN: begin
          if (last) state_q <= S_DONE;
          else      cnt_q   <= cnt_q + 4'd1;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // A held result may not be dropped: out_valid stays high until taken.
  a_hold_out: assert property (@(posedge clk) disable iff (!rst_n)
                               out_valid && !out_ready |=> out_valid);
  // Input is only taken when the core is free.
  a_no_load_busy: assert property (@(posedge clk) disable iff (!rst_n)
                                   (pre || run) |-> !in_ready);

endmodule
