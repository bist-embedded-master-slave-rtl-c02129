// test_controller: sequencer of the SPI master node.
//
// A rising edge on s_com starts one operation, chosen by mode:
//   Normal mode: one SPI transfer of the functional byte (the input mux
//     selects mas_data); when it ends, mas_load pulses so the node keeps the
//     slave's byte.
//   BIST mode: the pattern generator is loaded with its seed and the ORA
//     cleared; then NUM_PATTERNS + 1 transfers run back to back, each sending
//     the current LFSR pattern (mux selects the TPG) and stepping the LFSR
//     when it ends. The slave answers each pattern during the following
//     transfer, so the byte received in transfer k (k >= 1) is the CUT result
//     for pattern k-1 and is folded into the MISR (ora_en); the byte received
//     in transfer 0 is discarded. After the last transfer ora_check asks the
//     ORA for its verdict.
// A transfer is requested (xfer_start) only while the engine is not busy, so
// back-to-back transfers respect the engine's cs_n gap. done pulses for one
// clock at the end of either operation; busy is high from the s_com edge
// until then. Counting the patterns, driving the mux and
// triggering the comparison are the test controller's tasks in the design
// description; the one-transfer pipelining is this design's choice.
module test_controller
  import bist_pkg::*;
#(
  parameter int unsigned NUM_PATTERNS = bist_pkg::LFSR_PERIOD
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  s_com,
  input  mode_e mode,
  // SPI master engine
  output logic  xfer_start,
  input  logic  xfer_busy,
  input  logic  xfer_done,
  // input mux: 1 selects the test pattern, 0 the functional byte
  output logic  sel_tpg,
  // pattern generator
  output logic  tpg_load,
  output logic  tpg_step,
  // response analyser
  output logic  ora_clear,
  output logic  ora_en,
  output logic  ora_check,
  // functional result
  output logic  mas_load,
  output logic  busy,
  output logic  done
);

  typedef enum logic [2:0] {C_IDLE, C_N_XFER, C_N_WAIT, C_B_XFER, C_B_WAIT, C_B_CHECK} cstate_e;

  localparam int unsigned K_W = $clog2(NUM_PATTERNS + 1);

  cstate_e        state;
  logic           s_com_q;
  logic [K_W-1:0] k;

  wire go = s_com & ~s_com_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= C_IDLE;
      s_com_q <= 1'b0;
      k       <= '0;
    end else begin
      s_com_q <= s_com;
      unique case (state)
        C_IDLE: if (go) begin
          k      <= '0;
          state  <= (mode == MODE_BIST) ? C_B_XFER : C_N_XFER;
        end
        C_N_XFER:  if (!xfer_busy) state <= C_N_WAIT;
        C_N_WAIT:  if (xfer_done) state <= C_IDLE;
        C_B_XFER:  if (!xfer_busy) state <= C_B_WAIT;
        C_B_WAIT:  if (xfer_done) begin
          if (k == K_W'(NUM_PATTERNS)) state <= C_B_CHECK;
          else begin
            k     <= k + 1'b1;
            state <= C_B_XFER;
          end
        end
        C_B_CHECK: state <= C_IDLE;
        default:   state <= C_IDLE;
      endcase
    end
  end

  always_comb begin
    xfer_start = ((state == C_N_XFER) || (state == C_B_XFER)) && !xfer_busy;
    sel_tpg    = (state == C_B_XFER) || (state == C_B_WAIT) || (state == C_B_CHECK);
    tpg_load   = (state == C_IDLE) && go && (mode == MODE_BIST);
    ora_clear  = tpg_load;
    tpg_step   = (state == C_B_WAIT) && xfer_done;
    ora_en     = (state == C_B_WAIT) && xfer_done && (k != '0);
    ora_check  = (state == C_B_CHECK);
    mas_load   = (state == C_N_WAIT) && xfer_done;
    busy       = (state != C_IDLE);
    done       = mas_load || ora_check;
  end

endmodule
