// g729_decoder_periph: bus peripheral that puts the reconfigurable decoder
// on the processor bus; the top of the design.
//
// The processor runs the decoder and the reconfiguration entirely through
// this peripheral: it writes a frame into decoder memory, pulses start,
// polls rm_load against rm_ready, reconfigures the partition through the
// configuration port when they differ and then writes rm_ready, and polls
// done.  The bus side is the slave "IP interconnect" of a PLB interface
// block: one chip enable per software register (Bus2IP_RdCE/WrCE bit i =
// register i, 32 registers) and a chip select for the memory space.
//
// Register map (word offsets; R = read only, RW = read/write):
//    0 start (RW, bit 0)          1 done (R)
//    2 rm_ready (RW, bits 4:0)    3 rm_load (R)
//    4 continue (RW, bit 0)       5 CheckParityPitch done (R, sticky)
//    6 D_lsp done                 7 int_qlpc done
//    8 bits2prm_ld8k done (R, sticky)
//    9 Residu, 10 Weight_Az, 11 pst_ltp, 12 calc_st_filt, 13 filt_mu,
//   14 scale_st, 15 post_process, 16 syn_filt, 17 copy done
//   18 FSM state (R)             19 port abstraction select (R)
//   20 debug: last word the decoder wrote to scratch memory (R)
//   21..31 reserved, read 0.
// The sticky done flags are cleared by a start edge; flags of functions
// that this build of the decoder does not contain read 0.  Register writes
// honour Bus2IP_BE and are acknowledged in the same cycle, as are reads.
// Memory space: byte address bits 14:2 give a 13-bit word address, bit 14
// selecting the constant memory (64 KB window); accesses wait while the
// decoder is busy and are acknowledged one cycle after they are granted.
//
// icap_rm_id is the RM the configuration port has written into the
// partition; it comes from the configuration controller outside this
// peripheral.  Bus2IP_Resetn is active low.
//
// From the source design: a user-logic peripheral with 32 software
// registers and one memory region, the register offsets of start, done,
// rm_ready, rm_load, continue, the per-function done flags, state, mux and
// debug, and the memory offsets.  The chip-enable style, the byte-enable
// handling, the sticky flags, the debug word and the memory window split
// are this design's.
//
// IP2Bus_Error is constant 0: no register or memory access can fail.
module g729_decoder_periph
  import dpr_pkg::*;
(
  input  logic        Bus2IP_Clk,
  input  logic        Bus2IP_Resetn,
  input  logic [31:0] Bus2IP_Addr,
  input  logic        Bus2IP_CS,
  input  logic        Bus2IP_RNW,
  input  logic [31:0] Bus2IP_Data,
  input  logic [3:0]  Bus2IP_BE,
  input  logic [31:0] Bus2IP_RdCE,
  input  logic [31:0] Bus2IP_WrCE,
  output logic [31:0] IP2Bus_Data,
  output logic        IP2Bus_RdAck,
  output logic        IP2Bus_WrAck,
  output logic        IP2Bus_Error,
  input  rm_id_t      icap_rm_id
);

  localparam int unsigned REG_START = 0,  REG_DONE = 1,  REG_READY = 2,
                          REG_LOAD  = 3,  REG_CONT = 4,  REG_CPP   = 5,
                          REG_LD8K  = 8,  REG_STATE = 18, REG_MUX  = 19,
                          REG_DEBUG = 20;

  logic        clk, rst_n;
  logic [31:0] start_reg, ready_reg, cont_reg;
  logic        cpp_done, ld8k_done;
  logic        start_q;

  logic        done, rm_done, host_ack;
  rm_id_t      rm_load, mux_sel;
  logic [7:0]  out_state;
  mword_t      dbg_wdata, host_rdata;

  assign clk   = Bus2IP_Clk;
  assign rst_n = Bus2IP_Resetn;

  top_level u_decoder (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start_reg[0]),
    .cont       (cont_reg[0]),
    .rm_ready   (ready_reg[RM_ID_W-1:0]),
    .cfg_id     (icap_rm_id),
    .done       (done),
    .rm_load    (rm_load),
    .out_state  (out_state),
    .mux_sel    (mux_sel),
    .rm_done    (rm_done),
    .dbg_wdata  (dbg_wdata),
    .host_req   (Bus2IP_CS),
    .host_we    (!Bus2IP_RNW),
    .host_addr  (Bus2IP_Addr[14:2]),
    .host_wdata (Bus2IP_Data),
    .host_ack   (host_ack),
    .host_rdata (host_rdata)
  );

  // byte-enable merge of a register write
  function automatic logic [31:0] merge(input logic [31:0] old, wdat,
                                        input logic [3:0] be);
    logic [31:0] r;
    r = old;
    for (int b = 0; b < 4; b++) if (be[b]) r[8*b +: 8] = wdat[8*b +: 8];
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      start_reg <= '0;
      ready_reg <= '0;
      cont_reg  <= '0;
      cpp_done  <= 1'b0;
      ld8k_done <= 1'b0;
      start_q   <= 1'b0;
    end else begin
      if (Bus2IP_WrCE[REG_START]) start_reg <= merge(start_reg, Bus2IP_Data, Bus2IP_BE);
      if (Bus2IP_WrCE[REG_READY]) ready_reg <= merge(ready_reg, Bus2IP_Data, Bus2IP_BE);
      if (Bus2IP_WrCE[REG_CONT])  cont_reg  <= merge(cont_reg,  Bus2IP_Data, Bus2IP_BE);
      start_q <= start_reg[0];
      if (start_reg[0] && !start_q) begin
        cpp_done  <= 1'b0;
        ld8k_done <= 1'b0;
      end else if (rm_done) begin
        if (mux_sel == RM_B3) cpp_done  <= 1'b1;
        if (mux_sel == RM_B1) ld8k_done <= 1'b1;
      end
    end
  end

  logic [31:0] reg_rdata;
  always_comb begin
    reg_rdata = '0;
    for (int i = 0; i < 32; i++) begin
      if (Bus2IP_RdCE[i]) begin
        case (i)
          REG_START: reg_rdata = start_reg;
          REG_DONE:  reg_rdata = {31'd0, done};
          REG_READY: reg_rdata = ready_reg;
          REG_LOAD:  reg_rdata = 32'(rm_load);
          REG_CONT:  reg_rdata = cont_reg;
          REG_CPP:   reg_rdata = {31'd0, cpp_done};
          REG_LD8K:  reg_rdata = {31'd0, ld8k_done};
          REG_STATE: reg_rdata = 32'(out_state);
          REG_MUX:   reg_rdata = 32'(mux_sel);
          REG_DEBUG: reg_rdata = dbg_wdata;
          default:   reg_rdata = '0;
        endcase
      end
    end
  end

  assign IP2Bus_Data  = (Bus2IP_CS && host_ack) ? host_rdata : reg_rdata;
  assign IP2Bus_RdAck = (|Bus2IP_RdCE) || (Bus2IP_CS && host_ack &&  Bus2IP_RNW);
  assign IP2Bus_WrAck = (|Bus2IP_WrCE) || (Bus2IP_CS && host_ack && !Bus2IP_RNW);
  assign IP2Bus_Error = 1'b0;

endmodule
