// check_parity_pitch: reconfigurable module b3 (CheckParityPitch).  Checks
// the parity bit that protects the first pitch delay index of a frame.
//
// On start it reads the pitch index P1 from parm[3] and its parity bit P0
// from parm[4] (scratch addresses 627 and 628).  It forms the parity of the
// six most significant bits of the 8-bit index: the index is shifted right
// once, then six more times, and after each of those shifts its low bit is
// added to a sum that starts at one; the parity bit is added last.  Bit 0
// of the sum is 1 when the check fails.  That flag replaces parm[4], and
// done pulses one cycle later.  The shifts run on the shared shr unit
// (unit A) and the additions on the shared add unit (unit B), so the module
// takes about 35 cycles.
//
// Interface: clk, rst_n and the generalized port set of the reconfigurable
// partition (dpr_pkg::rm_in_t / rm_out_t), with the same index assignment
// as bits2prm_ld8k; unit A is shr here.  The constant memory ports are
// unused (out_12[2] is driven to 0).
//
// Name and role as the second module swapped in the partition follow the
// source design; the function is the G.729 reference routine of that name;
// the state machine and timing are this design's.
//
// Outputs that are constant by design: the constant-memory address
// (out_12[2]) is 0, the second operands of both units are fixed, and the
// write data has only its low bit live (it is a flag).
module check_parity_pitch
  import dpr_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  rm_in_t  rin,
  output rm_out_t rout
);

  logic        start, shr_done, add_done;
  logic [15:0] shr_res, add_res;
  mword_t      scratch_rdata;
  logic        done, we;
  maddr_t      raddr, waddr;
  mword_t      wdata;
  logic        shr_start, add_start;
  logic [15:0] shr_var1, shr_var2, add_var1, add_var2;

  assign start         = rin.in_1[0];
  assign shr_done      = rin.in_1[1];
  assign add_done      = rin.in_1[2];
  assign shr_res       = rin.in_16[0];
  assign add_res       = rin.in_16[1];
  assign scratch_rdata = rin.in_32[0];

  assign rout.out_1     = {add_start, shr_start, we, done};
  assign rout.out_12    = {12'd0, waddr, raddr};
  assign rout.out_16    = {add_var2, add_var1, shr_var2, shr_var1};
  assign rout.out_32[0] = wdata;

  typedef enum logic [3:0] {
    S_IDLE, S_RD_IDX, S_RD_PAR, S_CAP_PAR, S_SHR, S_SHRW, S_ADD, S_ADDW,
    S_ADDP, S_ADDPW, S_WRITE, S_DONE
  } state_e;
  state_e      state;
  logic [15:0] temp, sum, parity;
  logic [2:0]  i;        // number of shifts done after the first one

  assign raddr     = (state == S_RD_IDX) ? PARM_OFFSET + 12'd3 : PARM_OFFSET + 12'd4;
  assign waddr     = PARM_OFFSET + 12'd4;
  assign we        = (state == S_WRITE);
  assign wdata     = {31'd0, sum[0]};
  assign done      = (state == S_DONE);
  assign shr_start = (state == S_SHR);
  assign shr_var1  = temp;
  assign shr_var2  = 16'd1;
  assign add_start = (state == S_ADD) || (state == S_ADDP);
  assign add_var1  = sum;
  assign add_var2  = (state == S_ADDP) ? parity : {15'd0, temp[0]};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      temp   <= '0;
      sum    <= '0;
      parity <= '0;
      i      <= '0;
    end else begin
      case (state)
        S_IDLE:    if (start) state <= S_RD_IDX;
        S_RD_IDX:  state <= S_RD_PAR;
        S_RD_PAR: begin                       // parm[3] arrives
          temp  <= scratch_rdata[15:0];
          state <= S_CAP_PAR;
        end
        S_CAP_PAR: begin                      // parm[4] arrives
          parity <= scratch_rdata[15:0];
          sum    <= 16'd1;
          i      <= 3'd0;
          state  <= S_SHR;
        end
        S_SHR:  state <= S_SHRW;
        S_SHRW: if (shr_done) begin
          temp <= shr_res;
          if (i == 3'd0) begin               // first shift: no bit taken
            i     <= 3'd1;
            state <= S_SHR;
          end else begin
            state <= S_ADD;
          end
        end
        S_ADD:  state <= S_ADDW;
        S_ADDW: if (add_done) begin
          sum <= add_res;
          if (i == 3'd6) state <= S_ADDP;
          else begin
            i     <= i + 3'd1;
            state <= S_SHR;
          end
        end
        S_ADDP:  state <= S_ADDPW;
        S_ADDPW: if (add_done) begin
          sum   <= add_res;
          state <= S_WRITE;
        end
        S_WRITE: state <= S_DONE;
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
