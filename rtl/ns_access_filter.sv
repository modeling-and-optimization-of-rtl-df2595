// ns_access_filter: access filter of the near-storage accelerator.
//
// Every command arriving on the host interface is inspected: accelerator
// commands (NVMe vendor-specific opcodes 0xC0-0xFF) go to the accelerator's
// control logic, every other command (ordinary disk I/O) goes to the
// pass-through logic and on to the SSD. This is how the GAM launches a
// near-storage kernel with a user-defined NVMe command while the host keeps
// normal access to the disk.
//
// Splitting accelerator commands from disk accesses follows the design;
// telling them apart by the vendor-specific opcode range is this
// implementation's choice. Purely combinational valid/ready routing.
module ns_access_filter
  import reach_pkg::*;
(
  input  logic      host_valid,
  output logic      host_ready,
  input  nvme_cmd_t host_cmd,
  output logic      acc_valid,
  input  logic      acc_ready,
  output logic      io_valid,
  input  logic      io_ready,
  output nvme_cmd_t cmd
);
  logic is_acc;
  assign is_acc     = (host_cmd.opcode[7:6] == 2'b11);
  assign acc_valid  = host_valid && is_acc;
  assign io_valid   = host_valid && !is_acc;
  assign host_ready = is_acc ? acc_ready : io_ready;
  assign cmd        = host_cmd;
endmodule
