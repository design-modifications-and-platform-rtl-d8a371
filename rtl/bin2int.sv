// bin2int: reads nbits serial bit words from the scratch memory and packs
// them, most significant first, into an integer (G.729 serial format: a
// word 0x0081 is a one, anything else a zero).
//
// It is the sub-module of bits2prm_ld8k and, like every execution module of
// the decoder, does its arithmetic on the shared math units: for each bit
// it shifts the running value left by one on the shl unit (unit A) and, if
// the bit is a one, adds one on the add unit (unit B).  Per bit: one cycle
// to read the word (synchronous memory), two for the shift handshake and,
// for a one, two for the add; plus one cycle to finish.
//
// Ports: start (one-cycle pulse) with nbits (1..15) and base address;
// done pulses for one cycle with value valid (held until the next start).
// raddr/rdata is the scratch read port; a_* and b_* are the start, operands,
// done and result of math units A and B.  Only the lower 16 bits of a memory
// word are compared, so sign-extended words are accepted.
//
// The module's place in the hierarchy and its name follow the source
// design; its function is that of the G.729 reference routine of that name.
// The state sequence is this design's.
//
// Outputs that are constant by design: a_var2 and b_var2 are always 1
// (shift by one, add one).
module bin2int
  import dpr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [3:0]  nbits,
  input  maddr_t      base,
  output logic        done,
  output logic [15:0] value,
  output maddr_t      raddr,
  input  mword_t      rdata,
  output logic        a_start,
  output logic [15:0] a_var1,
  output logic [15:0] a_var2,
  input  logic        a_done,
  input  logic [15:0] a_res,
  output logic        b_start,
  output logic [15:0] b_var1,
  output logic [15:0] b_var2,
  input  logic        b_done,
  input  logic [15:0] b_res
);

  typedef enum logic [2:0] {S_IDLE, S_RD, S_SHL, S_SHLW, S_ADD, S_ADDW, S_DONE} state_e;
  state_e      state;
  logic [3:0]  cnt;
  logic [3:0]  len;
  maddr_t      base_q;
  logic        bit_one;

  assign raddr   = base_q + maddr_t'(cnt);
  assign a_start = (state == S_SHL);
  assign a_var1  = value;
  assign a_var2  = 16'd1;
  assign b_start = (state == S_ADD);
  assign b_var1  = value;
  assign b_var2  = 16'd1;
  assign done    = (state == S_DONE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      cnt     <= '0;
      len     <= '0;
      base_q  <= '0;
      value   <= '0;
      bit_one <= 1'b0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          base_q <= base;
          len    <= nbits;
          cnt    <= '0;
          value  <= '0;
          state  <= S_RD;
        end
        S_RD:   state <= S_SHL;               // word at raddr arrives
        S_SHL: begin
          bit_one <= (rdata[15:0] == BIT_1);
          state   <= S_SHLW;
        end
        S_SHLW: if (a_done) begin
          value <= a_res;
          state <= bit_one ? S_ADD : S_ADDW;
        end
        S_ADD:  state <= S_ADDW;
        S_ADDW: if (!bit_one || b_done) begin
          if (bit_one) value <= b_res;
          if (cnt + 4'd1 == len) state <= S_DONE;
          else begin
            cnt   <= cnt + 4'd1;
            state <= S_RD;
          end
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
