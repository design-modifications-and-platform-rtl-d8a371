// bits2prm_ld8k: reconfigurable module b1.  Converts the 80 received serial
// bit words of a frame into the 11 decoder parameters.
//
// On start it walks the serial buffer (scratch address 2944 onward) and, for
// parameter i = 0..10 with the G.729 field widths 8,10,8,1,13,4,7,5,13,4,7,
// lets its bin2int sub-module assemble the next field, then writes the value
// (zero-extended to 32 bits) to parm[i+1] at scratch address 625 + i.  done
// pulses for one cycle after the last write.  All arithmetic runs on the
// shared shl and add units through bin2int.
//
// Interface: like every module that can occupy the reconfigurable
// partition, it has only clk, rst_n and the generalized port set
// (dpr_pkg::rm_in_t / rm_out_t); inside, each generalized port is tied to
// its own named signal.  It uses in_1[0] start, in_1[1]/in_16[0] shl done and
// result, in_1[2]/in_16[1] add done and result, in_32[0] scratch read data;
// it drives out_1[0] done, out_1[1] write enable, out_1[2]/out_1[3] shl/add
// start, out_12[0]/[1] read/write address, out_16[0..3] shl and add
// operands and out_32[0] write data.  The constant memory ports are unused
// (out_12[2] is driven to 0).
//
// Its name, its place as a first-level module with bin2int below it and its
// role as one of the two modules actually swapped in the partition follow
// the source design; the function is the G.729 reference routine of that
// name; the state machine and timing are this design's.
//
// Outputs that are constant by design: the constant-memory address
// (out_12[2]) is 0 because this module reads no constants, the second
// operand of each unit is always 1, and the upper half of the write data is
// 0 (parameters are at most 13 bits).
module bits2prm_ld8k
  import dpr_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  rm_in_t  rin,
  output rm_out_t rout
);

  // named view of the generalized ports
  logic        start, shl_done, add_done;
  logic [15:0] shl_res, add_res;
  mword_t      scratch_rdata;
  logic        done, we;
  maddr_t      raddr, waddr;
  mword_t      wdata;
  logic        shl_start, add_start;
  logic [15:0] shl_var1, shl_var2, add_var1, add_var2;

  assign start         = rin.in_1[0];
  assign shl_done      = rin.in_1[1];
  assign add_done      = rin.in_1[2];
  assign shl_res       = rin.in_16[0];
  assign add_res       = rin.in_16[1];
  assign scratch_rdata = rin.in_32[0];

  assign rout.out_1     = {add_start, shl_start, we, done};
  assign rout.out_12    = {12'd0, waddr, raddr};
  assign rout.out_16    = {add_var2, add_var1, shl_var2, shl_var1};
  assign rout.out_32[0] = wdata;

  typedef enum logic [2:0] {S_IDLE, S_CALL, S_WAIT, S_WRITE, S_DONE} state_e;
  state_e      state;
  logic [3:0]  idx;
  maddr_t      pos;
  logic        b2i_start, b2i_done;
  logic [15:0] b2i_value;

  bin2int u_bin2int (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (b2i_start),
    .nbits   (bitsno(32'(idx))),
    .base    (pos),
    .done    (b2i_done),
    .value   (b2i_value),
    .raddr   (raddr),
    .rdata   (scratch_rdata),
    .a_start (shl_start),
    .a_var1  (shl_var1),
    .a_var2  (shl_var2),
    .a_done  (shl_done),
    .a_res   (shl_res),
    .b_start (add_start),
    .b_var1  (add_var1),
    .b_var2  (add_var2),
    .b_done  (add_done),
    .b_res   (add_res)
  );

  assign b2i_start = (state == S_CALL);
  assign we        = (state == S_WRITE);
  assign waddr     = PARM_OFFSET + maddr_t'(idx) + 12'd1;
  assign wdata     = {16'd0, b2i_value};
  assign done      = (state == S_DONE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      idx   <= '0;
      pos   <= SERIAL_OFFSET;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          idx   <= '0;
          pos   <= SERIAL_OFFSET;
          state <= S_CALL;
        end
        S_CALL:  state <= S_WAIT;
        S_WAIT:  if (b2i_done) state <= S_WRITE;
        S_WRITE: begin
          pos <= pos + maddr_t'(bitsno(32'(idx)));
          if (idx == 4'(PRM_SIZE - 1)) state <= S_DONE;
          else begin
            idx   <= idx + 4'd1;
            state <= S_CALL;
          end
        end
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
