// lmb_pkg: signal bundles of the Local Memory Bus (LMB), the processor's
// dedicated bus to its on-chip block RAM. There is one LMB for instructions
// (ilmb) and one for data (dlmb). A cycle is one clock with addrstrobe high;
// the memory answers with ready (and read data) in the clock after it. The two
// LMBs and the two-clock access are the original platform's; the signal set is
// the usual LMB set, chosen here.
package lmb_pkg;

  typedef struct packed {
    logic [31:0] abus;         // byte address
    logic [31:0] wdbus;        // write data
    logic [3:0]  be;           // byte enables, be[0] for data[7:0]
    logic        addrstrobe;   // a cycle starts in this clock
    logic        readstrobe;   // it is a read
    logic        writestrobe;  // it is a write
  } lmb_req_t;

  typedef struct packed {
    logic [31:0] dbus;         // read data, valid with ready
    logic        ready;        // the cycle started in the previous clock is done
  } lmb_rsp_t;

  localparam lmb_req_t LMB_REQ_IDLE = '0;

endpackage
