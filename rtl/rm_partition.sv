// rm_partition: the reconfigurable partition of the decoder, in the form
// used to simulate and check a partially reconfigurable design.
//
// On the FPGA the partition is a black box whose contents the configuration
// port rewrites at run time with the partial bitstream of one
// reconfigurable module (RM).  Here every RM of the set is instantiated,
// each driving its own output bundle, and cfg_id (the RM the partition
// currently holds, as set by the configuration port) selects which bundle
// reaches the static logic.  An RM that is not configured is held in reset,
// so it comes up in its initial state when it is loaded, as a freshly
// configured module does.  While cfg_id names no RM (blank, or in the middle
// of a reconfiguration) all outputs are zero.
//
// Ports: clk, rst_n, cfg_id, rin (generalized inputs, fanned out to all
// RMs), rout (generalized outputs of the configured RM).  Combinational from
// cfg_id and the RM outputs to rout.  Instantiating all RMs with separate
// output nets follows the source design's simulation method; the reset hold
// and the all-zero blank partition are this design's.
module rm_partition
  import dpr_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  rm_id_t  cfg_id,
  input  rm_in_t  rin,
  output rm_out_t rout
);

  rm_out_t rout_b1, rout_b3;

  bits2prm_ld8k u_rm_b1 (
    .clk   (clk),
    .rst_n (rst_n && cfg_id == RM_B1),
    .rin   (rin),
    .rout  (rout_b1)
  );

  check_parity_pitch u_rm_b3 (
    .clk   (clk),
    .rst_n (rst_n && cfg_id == RM_B3),
    .rin   (rin),
    .rout  (rout_b3)
  );

  always_comb begin
    case (cfg_id)
      RM_B1:   rout = rout_b1;
      RM_B3:   rout = rout_b3;
      default: rout = '0;
    endcase
  end

endmodule
