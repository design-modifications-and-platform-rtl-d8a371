// decoder_ctrl_fsm: control state machine of the reconfigurable decoder.
//
// It calls the decoding functions of one frame in order and manages the
// reconfigurable partition through two 5-bit signals: rm_load names the
// reconfigurable module (RM) the decoder needs next, and rm_ready, written
// by the host after it has reconfigured the partition, names the RM now on
// the chip.  The load request is raised at the earliest point where the
// next RM is certain, and static work continues while the partition is
// rewritten; the FSM waits for rm_ready == rm_load only right before it
// starts that RM.  Sequence for one frame:
//
//   IDLE        done high; a rising start edge begins a frame, done drops
//   LOAD_B1     rm_load <= 1 (bits2prm_ld8k)
//   PAUSE_1     test pause: falls through while cont is high
//   WAIT_B1     stall until rm_ready == 1
//   RUN_B1      start pulse to the partition, wait for its done
//   LOAD_B3     rm_load <= 3 (CheckParityPitch), right after b1 finishes
//   ERASE_*     static work overlapped with the reconfiguration: scan the
//               80 serial words; any all-zero word marks a frame erasure,
//               written to parm[0]
//   PAUSE_2     test pause
//   WAIT_B3     stall until rm_ready == 3
//   RUN_B3      start pulse, wait for done
//   FINISH      back to IDLE, where done is high again
//
// done stays high for as long as the FSM is idle (not just one cycle) so a
// polling processor cannot miss it.  out_state gives the state code.  While
// no RM is running the FSM owns the memory port (mem_own) for its own
// accesses.  rm_start/rm_done are the start and done of the RM in the
// partition.  The timing of a stall is set entirely by the host.
// Two immediate assertions state the handshake rules: an RM is started
// only when rm_ready equals rm_load, and rm_load is stable while it runs.
//
// From the source design: the load/ready pair and its width, the early
// load request with a wait before each RM, the extended done, the continue
// input that lets pause states fall through, and the order b1 then b3.  The
// erasure scan as the overlapping static work, the state codes and the
// rising-edge start are this design's choices.
//
// Outputs that are constant by design: the upper bits of out_state,
// mem_waddr (the FSM writes only parm[0]) and mem_wdata[31:1] (it writes a
// flag).
module decoder_ctrl_fsm
  import dpr_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       cont,
  input  rm_id_t     rm_ready,
  output logic       done,
  output logic       busy,
  output rm_id_t     rm_load,
  output logic [7:0] out_state,
  // reconfigurable module handshake
  output logic       rm_start,
  input  logic       rm_done,
  // the FSM's own scratch memory access
  output logic       mem_own,
  output maddr_t     mem_raddr,
  input  mword_t     mem_rdata,
  output logic       mem_we,
  output maddr_t     mem_waddr,
  output mword_t     mem_wdata
);

  typedef enum logic [7:0] {
    S_IDLE      = 8'd0,
    S_LOAD_B1   = 8'd1,
    S_PAUSE_1   = 8'd2,
    S_WAIT_B1   = 8'd3,
    S_RUN_B1    = 8'd4,
    S_BUSY_B1   = 8'd5,
    S_LOAD_B3   = 8'd6,
    S_ERASE_ADR = 8'd7,
    S_ERASE_CHK = 8'd8,
    S_ERASE_WR  = 8'd9,
    S_PAUSE_2   = 8'd10,
    S_WAIT_B3   = 8'd11,
    S_RUN_B3    = 8'd12,
    S_BUSY_B3   = 8'd13,
    S_FINISH    = 8'd14
  } state_e;

  state_e     state;
  logic       start_q;
  logic [6:0] k;
  logic       erasure;

  assign out_state = state;
  assign done      = (state == S_IDLE);
  assign busy      = (state != S_IDLE);
  assign rm_start  = (state == S_RUN_B1) || (state == S_RUN_B3);
  assign mem_own   = !(state inside {S_RUN_B1, S_BUSY_B1, S_RUN_B3, S_BUSY_B3});
  assign mem_raddr = SERIAL_OFFSET + maddr_t'(k);
  assign mem_we    = (state == S_ERASE_WR);
  assign mem_waddr = PARM_OFFSET;
  assign mem_wdata = {31'd0, erasure};

  // handshake rules: a module is started only once the host has reported
  // it present, and the load request never changes while a module runs
  always_ff @(posedge clk) begin
    if (rst_n && rm_start)
      assert (rm_ready == rm_load) else $error("RM started before rm_ready matched rm_load");
    if (rst_n && !mem_own && state != S_RUN_B1 && state != S_RUN_B3)
      assert ($stable(rm_load)) else $error("rm_load changed while an RM was running");
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      start_q <= 1'b0;
      rm_load <= RM_NONE;
      k       <= '0;
      erasure <= 1'b0;
    end else begin
      start_q <= start;
      case (state)
        S_IDLE:      if (start && !start_q) state <= S_LOAD_B1;
        S_LOAD_B1: begin
          rm_load <= RM_B1;
          state   <= S_PAUSE_1;
        end
        S_PAUSE_1:   if (cont) state <= S_WAIT_B1;
        S_WAIT_B1:   if (rm_ready == RM_B1) state <= S_RUN_B1;
        S_RUN_B1:    state <= S_BUSY_B1;
        S_BUSY_B1:   if (rm_done) state <= S_LOAD_B3;
        S_LOAD_B3: begin
          rm_load <= RM_B3;
          k       <= '0;
          erasure <= 1'b0;
          state   <= S_ERASE_ADR;
        end
        S_ERASE_ADR: state <= S_ERASE_CHK;      // word k arrives next cycle
        S_ERASE_CHK: begin
          if (mem_rdata == '0) erasure <= 1'b1;
          if (k == 7'(SERIAL_SIZE - 1)) state <= S_ERASE_WR;
          else begin
            k     <= k + 7'd1;
            state <= S_ERASE_ADR;
          end
        end
        S_ERASE_WR:  state <= S_PAUSE_2;
        S_PAUSE_2:   if (cont) state <= S_WAIT_B3;
        S_WAIT_B3:   if (rm_ready == RM_B3) state <= S_RUN_B3;
        S_RUN_B3:    state <= S_BUSY_B3;
        S_BUSY_B3:   if (rm_done) state <= S_FINISH;
        S_FINISH:    state <= S_IDLE;
        default:     state <= S_IDLE;
      endcase
    end
  end

endmodule
