// opb_pkg: signal bundles of the On-chip Peripheral Bus (OPB), the shared
// memory-mapped system bus that connects the processor to its peripherals.
// The OPB is a single-master-at-a-time bus whose data and reply lines are
// OR-combined: a slave that is not answering drives all zeros. Bits are numbered
// little-endian here ([31:0], bit 0 the least significant), while CoreConnect
// documentation numbers them 0..31 from the most significant end; the meaning of
// each line is the same. That the peripherals sit on an OPB is the original
// platform's; the selection of signals is the usual OPB set, chosen here.
package opb_pkg;

  // Master cycle as seen by every slave (address, byte lanes, write data, control).
  typedef struct packed {
    logic [31:0] abus;     // byte address
    logic [3:0]  be;       // byte enables, be[0] for data[7:0]
    logic [31:0] dbus;     // write data
    logic        rnw;      // 1 = read, 0 = write
    logic        select;   // a cycle is in progress; held until it is acknowledged
    logic        seqaddr;  // next cycle follows on the same slave (unused here)
  } opb_req_t;

  // Reply of one slave. All fields are zero while the slave is not acknowledging.
  typedef struct packed {
    logic [31:0] dbus;     // read data, valid with xferack
    logic        xferack;  // cycle done
    logic        errack;   // cycle done with an error (comes with xferack)
    logic        retry;    // slave asks the master to repeat the cycle
    logic        toutsup;  // slave suppresses the bus timeout
  } opb_rsp_t;

  // Reply of the bus to the master.
  typedef struct packed {
    logic [31:0] dbus;
    logic        xferack;
    logic        errack;
    logic        retry;
    logic        timeout;  // no slave answered within the timeout window
  } opb_mrsp_t;

  localparam opb_req_t OPB_REQ_IDLE = '0;

endpackage
