// tb_port_abstraction: randomized check of the port abstraction multiplexer.
//
// The block is combinational.  For random values of the selector (b1, b3
// and ids of modules not in this build), the FSM memory signals, the
// partition's generic outputs and the math unit responses, the testbench
// computes where every signal must go and compares:
//   - scratch memory port: FSM signals while it owns the port, else the
//     partition's address, write enable and data; constant address always
//     from the partition,
//   - unit A is the shift-left unit for b1 and the shift-right unit for b3,
//     unit B the add unit; their starts reach the unit only for a known id,
//   - every other math unit sees an idle request,
//   - the partition's generic inputs carry start, unit dones, unit results
//     and both memory read words,
//   - rm_done reaches the FSM only for a known id.
// Each routing case (b1, b3, unknown id, FSM owner, partition owner) is
// counted and must occur.
module tb_port_abstraction;
  import dpr_pkg::*;

  rm_id_t    sel;
  logic      fsm_rm_start, fsm_rm_done, fsm_mem_own, fsm_we, scr_we;
  maddr_t    fsm_raddr, fsm_waddr, scr_raddr, scr_waddr, cst_addr;
  mword_t    fsm_wdata, fsm_rdata, scr_wdata, scr_rdata, cst_rdata;
  rm_in_t    rin;
  rm_out_t   rout;
  math_req_t math_req [NUM_OPS];
  math_rsp_t math_rsp [NUM_OPS];

  port_abstraction dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s (sel=%0d)", what, sel);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_b1 = 0, n_b3 = 0, n_other = 0, n_fsm = 0, n_rm = 0;
    for (int it = 0; it < 20000; it++) begin
      int shift_unit;
      bit known;
      case ($urandom_range(0, 3))
        0: sel = RM_B1;
        1: sel = RM_B3;
        2: sel = RM_NONE;
        default: sel = rm_id_t'($urandom);
      endcase
      fsm_rm_start = 1'($urandom); fsm_mem_own = 1'($urandom); fsm_we = 1'($urandom);
      fsm_raddr = maddr_t'($urandom); fsm_waddr = maddr_t'($urandom); fsm_wdata = $urandom;
      scr_rdata = $urandom; cst_rdata = $urandom;
      rout.out_1  = 4'($urandom);
      rout.out_12 = 36'({$urandom, $urandom});
      rout.out_16 = {$urandom, $urandom};
      rout.out_32 = $urandom;
      for (int i = 0; i < NUM_OPS; i++) begin
        math_rsp[i].done = 1'($urandom);
        math_rsp[i].overflow = 1'($urandom);
        math_rsp[i].res = $urandom;
      end
      #1;
      known = (sel == 5'd1) || (sel == 5'd3);
      shift_unit = (sel == 5'd3) ? 8 : 6;    // position of shr / shl in the unit list
      if (sel == 5'd1) n_b1++; else if (sel == 5'd3) n_b3++; else n_other++;
      if (fsm_mem_own) n_fsm++; else n_rm++;

      if (fsm_mem_own) begin
        check(scr_raddr == fsm_raddr && scr_we == fsm_we && scr_waddr == fsm_waddr &&
              scr_wdata == fsm_wdata, "FSM drives the scratch port while it owns it");
      end else begin
        check(scr_raddr == rout.out_12[0] && scr_we == rout.out_1[1] &&
              scr_waddr == rout.out_12[1] && scr_wdata == rout.out_32[0],
              "partition drives the scratch port");
      end
      check(cst_addr == rout.out_12[2], "constant address from the partition");
      check(fsm_rdata == scr_rdata, "FSM sees the scratch read word");
      check(fsm_rm_done == (known && rout.out_1[0]), "rm_done only for a known module");

      for (int i = 0; i < NUM_OPS; i++) begin
        if (i == shift_unit) begin
          check(math_req[i].start == (known && rout.out_1[2]), "unit A start");
          check(math_req[i].c == rout.out_16[0] && math_req[i].d == rout.out_16[1],
                "unit A operands");
        end else if (i == 0) begin
          check(math_req[i].start == (known && rout.out_1[3]), "unit B (add) start");
          check(math_req[i].c == rout.out_16[2] && math_req[i].d == rout.out_16[3],
                "unit B operands");
        end else begin
          check(math_req[i] == '0, $sformatf("unit %0d idle", i));
        end
      end
      check(rin.in_1[0] == fsm_rm_start, "start reaches the partition");
      check(rin.in_1[1] == math_rsp[shift_unit].done && rin.in_16[0] == math_rsp[shift_unit].res[15:0],
            "unit A response");
      check(rin.in_1[2] == math_rsp[0].done && rin.in_16[1] == math_rsp[0].res[15:0],
            "unit B response");
      check(rin.in_32[0] == scr_rdata && rin.in_32[1] == cst_rdata, "memory read words");
    end
    check(n_b1 > 0 && n_b3 > 0 && n_other > 0, "all selector cases happened");
    check(n_fsm > 0 && n_rm > 0, "both memory owners happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
