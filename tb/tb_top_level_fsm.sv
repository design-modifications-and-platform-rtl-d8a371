// tb_top_level_fsm: test of the control side of the decoder: control FSM,
// port abstraction and the reconfigurable partition together.
//
// The datapath is modelled in the testbench: a 4096-word scratch memory
// with one-cycle read and 19 math unit models that answer one cycle after
// their start.  A host model watches rm_load; when it changes the model
// blanks the partition (cfg_id = 0), waits a random reconfiguration time,
// loads the requested module (cfg_id) and then raises rm_ready.  For random
// frames, some with an all-zero word, the test checks parm[0..11] after
// done, that mux_sel follows rm_ready, that rm_done pulses exactly twice
// per frame (once per module), that busy is the complement of done, and
// that no math unit is started while the partition is blank.  Stalls and
// hidden reconfigurations are counted and must both occur.
module tb_top_level_fsm;
  import dpr_pkg::*;
  import g729_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       start = 1'b0, cont = 1'b1;
  rm_id_t     rm_ready = RM_NONE, cfg_id = RM_NONE;
  logic       done, busy, rm_done, scr_we;
  rm_id_t     rm_load, mux_sel;
  logic [7:0] out_state;
  math_req_t  math_req [NUM_OPS];
  math_rsp_t  math_rsp [NUM_OPS];
  maddr_t     scr_raddr, scr_waddr, cst_addr;
  mword_t     scr_wdata, scr_rdata, cst_rdata;

  top_level_fsm dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // datapath model
  mword_t mem [MEM_DEPTH];
  always_ff @(posedge clk) begin
    scr_rdata <= mem[scr_raddr];
    cst_rdata <= '0;
    if (scr_we) mem[scr_waddr] <= scr_wdata;
    for (int i = 0; i < NUM_OPS; i++) begin
      op_result_t r;
      r = eval_op(op_e'(i), math_req[i]);
      math_rsp[i].done <= math_req[i].start;
      if (math_req[i].start) begin
        math_rsp[i].res <= r.val;
        math_rsp[i].overflow <= r.ovf;
      end
    end
  end

  // host model
  int reconf_delay = 10, n_reconf = 0;
  always @(posedge clk) begin
    if (rst_n && rm_load != rm_ready && rm_load != RM_NONE) begin
      rm_id_t want;
      want = rm_load;
      cfg_id <= RM_NONE;
      repeat (reconf_delay) @(posedge clk);
      cfg_id <= want;
      @(posedge clk);
      rm_ready <= want;
      n_reconf++;
      @(posedge clk);
    end
  end

  int n_rm_done = 0, n_stall = 0, n_hidden = 0;
  logic [7:0] st_q = '0;
  always @(posedge clk) if (rst_n) begin
    check(mux_sel == rm_ready, "mux_sel follows rm_ready");
    check(busy == !done, "busy is the complement of done");
    if (cfg_id == RM_NONE)
      for (int i = 0; i < NUM_OPS; i++) check(!math_req[i].start, "no unit start from a blank partition");
    if (rm_done) n_rm_done++;
    if (out_state == 8'd3 || out_state == 8'd11) n_stall++;
    if (out_state == 8'd11 && st_q != 8'd11 && rm_ready == RM_B3) n_hidden++;
    st_q <= out_state;
  end

  initial begin
    int n_erased = 0, n_frames = 0;
    for (int i = 0; i < NUM_OPS; i++) math_rsp[i] = '0;
    for (int a = 0; a < MEM_DEPTH; a++) mem[a] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    for (int f = 0; f < 30; f++) begin
      bit b [80];
      bit erased;
      int d0, t;
      erased = (f % 3 == 1);
      for (int k = 0; k < 80; k++) begin
        b[k] = 1'($urandom);
        mem[SERIAL_OFFSET + k] = bit_word(b[k]);
      end
      if (erased) begin
        int z;
        z = $urandom_range(0, 79);
        mem[SERIAL_OFFSET + z] = '0;
        b[z] = 1'b0;
      end
      reconf_delay = (f % 2 == 0) ? $urandom_range(1, 20) : $urandom_range(400, 1500);
      d0 = n_rm_done;
      @(posedge clk) start <= 1'b1;
      @(posedge clk) start <= 1'b0;
      repeat (2) @(posedge clk);
      t = 0;
      while (!done && t < 200_000) begin
        @(posedge clk);
        t++;
      end
      check(done, "frame completes");
      check(n_rm_done - d0 == 2, "rm_done once per module");
      check(mem[PARM_OFFSET] == 32'(erased), "erasure flag");
      if (erased && mem[PARM_OFFSET] == 1) n_erased++;
      for (int i = 0; i < PRM_SIZE; i++) begin
        int e;
        e = (i == 3) ? parity_flag(field_value(b, 2), field_value(b, 3)) : field_value(b, i);
        check(mem[PARM_OFFSET + 1 + i] == 32'(e), $sformatf("frame %0d parm[%0d]", f, i + 1));
      end
      n_frames++;
      @(posedge clk) rm_ready <= RM_NONE;
      repeat (3) @(posedge clk);
    end
    check(n_stall > 0, "stall happened");
    check(n_hidden > 0, "hidden reconfiguration happened");
    check(n_erased > 0, "erasure happened");
    $display("frames %0d, reconfigurations %0d, stall cycles %0d, hidden %0d",
             n_frames, n_reconf, n_stall, n_hidden);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
