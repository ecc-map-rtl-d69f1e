// remap_trigger: the ECC-Map remapping trigger.
//
// A host write to a line whose physical location has already absorbed more
// than PHI writes must not be written in place: the logical line is first
// remapped. Writes that belong to a remapping never trigger. The wear of a
// location is an estimate supplied by the media (a write count, or a value
// derived from a reliability measurement such as corrected bit errors).
// PHI defaults to the published threshold formula, evaluated at
// elaboration for the device size N, window S and endurance W_MAX; CAP_PCT
// limits it to a percentage of W_MAX (100 = no cap). Purely combinational.
module remap_trigger
  import ecc_map_pkg::*;
#(
  parameter int unsigned N       = 1024,
  parameter int unsigned S       = 32,
  parameter int unsigned W_MAX   = 2048,
  parameter int unsigned CAP_PCT = 100,
  parameter int unsigned WEAR_W  = 16,
  parameter int unsigned PHI     = phi_opt(N, S, W_MAX, CAP_PCT)
) (
  input  logic              host_write,  // the access is a host write
  input  logic [WEAR_W-1:0] wear,        // wear estimate of the mapped PLA
  output logic              trigger
);

  assign trigger = host_write && (32'(wear) > PHI);

endmodule
