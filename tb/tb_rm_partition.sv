// tb_rm_partition: test of the reconfigurable partition model.
//
// The partition holds b1 (bits2prm_ld8k) and b3 (check_parity_pitch) and
// lets only the one named by cfg_id act, the way the FPGA region holds one
// partial bitstream at a time.  The environment models the scratch memory
// (one-cycle read) and the two shared units behind the generic ports: unit
// A is shift left for b1 and shift right for b3, unit B is add, each with
// the one-cycle latency of the real units.  The test checks:
//   - with an id that names no module the outputs are all zero,
//   - b1 loaded: a start decodes a random 80-bit frame into parm[1..11],
//   - b3 loaded: a start replaces parm[4] with the parity flag and writes
//     nothing else,
//   - a module that is unloaded and reloaded comes back in its reset state
//     (it does not remember a run interrupted by the reconfiguration),
//   - a start given while the other module is loaded does nothing to the
//     absent one.
// Each case is counted and must occur.
module tb_rm_partition;
  import dpr_pkg::*;
  import g729_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  rm_id_t  cfg_id = RM_NONE;
  rm_in_t  rin;
  rm_out_t rout;

  rm_partition dut (.clk, .rst_n, .cfg_id, .rin, .rout);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // environment: memory and the two units
  mword_t mem [MEM_DEPTH];
  logic   start = 1'b0;
  logic   a_done = 1'b0, b_done = 1'b0;
  logic [15:0] a_res = '0, b_res = '0;
  mword_t rdata = '0;
  int     n_writes = 0;
  maddr_t last_waddr;

  always_comb begin
    rin = '0;
    rin.in_1[0]  = start;
    rin.in_1[1]  = a_done;
    rin.in_1[2]  = b_done;
    rin.in_16[0] = a_res;
    rin.in_16[1] = b_res;
    rin.in_32[0] = rdata;
  end

  always_ff @(posedge clk) begin
    rdata  <= mem[rout.out_12[0]];
    if (rout.out_1[1]) begin
      mem[rout.out_12[1]] <= rout.out_32[0];
      n_writes++;
      last_waddr = rout.out_12[1];
    end
    a_done <= rout.out_1[2];
    b_done <= rout.out_1[3];
    if (rout.out_1[2])
      a_res <= (cfg_id == RM_B3) ? 16'($signed(rout.out_16[0]) >>> rout.out_16[1])
                                 : 16'(rout.out_16[0] << rout.out_16[1]);
    if (rout.out_1[3]) b_res <= rout.out_16[2] + rout.out_16[3];
  end

  task automatic pulse_start_and_wait(output int cycles);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cycles = 0;
    while (!rout.out_1[0] && cycles < 2000) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  task automatic load(input rm_id_t id);
    @(negedge clk) cfg_id = RM_NONE;      // partition blank while rewritten
    repeat (5) @(negedge clk);
    check(rout == '0, "blank partition drives nothing");
    cfg_id = id;
  endtask

  initial begin
    int n_b1 = 0, n_b3 = 0, n_blank = 0, n_reset = 0, n_absent = 0;
    for (int a = 0; a < MEM_DEPTH; a++) mem[a] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int it = 0; it < 30; it++) begin
      bit b [80];
      int cyc, w0, p1, p0;
      mword_t prev_parm [12];
      // blank / unknown ids
      cfg_id = rm_id_t'($urandom_range(4, 31));
      start = 1'b1;
      repeat (3) @(negedge clk);
      start = 1'b0;
      check(rout == '0, "unknown id drives nothing");
      if (rout == '0) n_blank++;

      // b1: a random frame
      for (int k = 0; k < 80; k++) begin
        b[k] = 1'($urandom);
        mem[SERIAL_OFFSET + k] = bit_word(b[k]);
      end
      load(RM_B1);
      w0 = n_writes;
      pulse_start_and_wait(cyc);
      check(rout.out_1[0], "b1 finishes");
      @(negedge clk);
      check(n_writes - w0 == 11, "b1 writes 11 parameters");
      for (int i = 0; i < PRM_SIZE; i++)
        check(mem[PARM_OFFSET + 1 + i] == 32'(field_value(b, i)),
              $sformatf("b1 parm[%0d]", i + 1));
      n_b1++;

      // start b1 again, interrupt it by a reconfiguration, reload: it must
      // come back idle (no write, done low, nothing started)
      if (it % 3 == 0) begin
        @(negedge clk) start = 1'b1;
        @(negedge clk) start = 1'b0;
        repeat (20) @(negedge clk);
        load(RM_B3);
        w0 = n_writes;
        load(RM_B1);
        repeat (50) @(negedge clk);
        check(n_writes == w0 && rout.out_1 == '0, "reloaded module starts from reset");
        if (n_writes == w0) n_reset++;
      end

      // b3 on the parameters b1 left
      for (int i = 0; i < 12; i++) prev_parm[i] = mem[PARM_OFFSET + i];
      p1 = field_value(b, 2);
      p0 = field_value(b, 3);
      load(RM_B3);
      w0 = n_writes;
      pulse_start_and_wait(cyc);
      check(rout.out_1[0], "b3 finishes");
      @(negedge clk);
      check(n_writes - w0 == 1 && last_waddr == maddr_t'(PARM_OFFSET + 4), "b3 writes parm[4] only");
      check(mem[PARM_OFFSET + 4] == 32'(parity_flag(p1, p0)), "b3 parity flag");
      for (int i = 0; i < 12; i++)
        if (i != 4) check(mem[PARM_OFFSET + i] == prev_parm[i], "b3 leaves other parameters");
      n_b3++;

      // with b3 loaded, a start must not run b1's decoding
      w0 = n_writes;
      pulse_start_and_wait(cyc);
      @(negedge clk);
      check(n_writes - w0 == 1 && last_waddr == maddr_t'(PARM_OFFSET + 4),
            "only the loaded module acts");
      n_absent++;
    end
    check(n_b1 > 0 && n_b3 > 0 && n_blank > 0 && n_reset > 0 && n_absent > 0,
          "all partition cases happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
