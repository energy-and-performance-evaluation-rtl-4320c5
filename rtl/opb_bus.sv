// opb_bus: the shared On-chip Peripheral Bus between one master (the processor)
// and NUM_SLAVES memory-mapped slaves.
//
// The master's cycle goes to every slave unchanged; each slave decodes the
// address itself. The replies are OR-combined, which works because a slave that
// is not acknowledging drives zeros. If select stays high for TIMEOUT clocks
// without xferack, retry or toutsup, the bus raises timeout for one clock so
// that the master can end a cycle to an address nobody owns. With a single
// master there is nothing to arbitrate. The slaves must never acknowledge in
// the same clock; an assertion checks this.
//
// The OPB as a shared, variable-latency, memory-mapped bus is the platform's;
// the OR-combined replies and the 16-clock timeout are the usual OPB rules and
// the design's choice where the platform says nothing.
module opb_bus
  import opb_pkg::*;
#(
  parameter int unsigned NUM_SLAVES = 2,
  parameter int unsigned TIMEOUT    = 16
) (
  input  logic      clk,
  input  logic      rst,
  input  opb_req_t  m_req,
  output opb_mrsp_t m_rsp,
  output opb_req_t  opb,
  input  opb_rsp_t  sl [NUM_SLAVES]
);

  localparam int unsigned TW = $clog2(TIMEOUT + 1);

  logic [TW-1:0] wait_q;
  logic          answered;
  int unsigned   n_ack;

  always_comb begin
    opb           = m_req;
    m_rsp         = '0;
    n_ack         = 0;
    for (int i = 0; i < NUM_SLAVES; i++) begin
      m_rsp.dbus    = m_rsp.dbus    | sl[i].dbus;
      m_rsp.xferack = m_rsp.xferack | sl[i].xferack;
      m_rsp.errack  = m_rsp.errack  | sl[i].errack;
      m_rsp.retry   = m_rsp.retry   | sl[i].retry;
      n_ack         = n_ack + 32'(sl[i].xferack);
    end
    answered      = m_rsp.xferack || m_rsp.retry;
    for (int i = 0; i < NUM_SLAVES; i++) answered = answered || sl[i].toutsup;
    m_rsp.timeout = m_req.select && !answered && (wait_q == TW'(TIMEOUT - 1));
  end

  always_ff @(posedge clk) begin
    if (rst || !m_req.select || answered || m_rsp.timeout) wait_q <= '0;
    else                                                   wait_q <= wait_q + TW'(1);
  end

  always_ff @(posedge clk) begin
    if (!rst) begin
      assert (n_ack <= 1) else $error("opb_bus: %0d slaves acknowledged at once", n_ack);
    end
  end

endmodule
