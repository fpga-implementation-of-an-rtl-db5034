// opb_decoder: address decoder of the hub's peripheral bus.
//
// The processor is the only bus master. Its request is passed to the one
// slave whose 64 KiB window holds the address (the external memory controller
// owns a 512 KiB window): the reader UARTs RS232, RS232_1, ... from 0x40660000
// downwards in steps of 0x20000, the Ethernet core, the debug module, the
// general-purpose I/O and the external SRAM (see hub_pkg for the map). Slaves
// answer with read data and a one-cycle acknowledge; their answers are ORed,
// as each slave drives zeros when it does not acknowledge. An address no slave
// owns, or a slave that has not answered within TIMEOUT cycles, is answered
// with an error acknowledge, so the master never hangs.
// The OR-combined response and the timeout follow the usual practice of such
// buses; the exact timeout is this design's choice.
module opb_decoder #(
  parameter int unsigned NUM_UARTS = 4,
  parameter int unsigned TIMEOUT   = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  hub_pkg::opb_req_t m_req,
  output hub_pkg::opb_rsp_t m_rsp,
  output hub_pkg::opb_req_t uart_req [NUM_UARTS],
  input  hub_pkg::opb_rsp_t uart_rsp [NUM_UARTS],
  output hub_pkg::opb_req_t eth_req,
  input  hub_pkg::opb_rsp_t eth_rsp,
  output hub_pkg::opb_req_t mem_req,
  input  hub_pkg::opb_rsp_t mem_rsp,
  output hub_pkg::opb_req_t dbg_req,
  input  hub_pkg::opb_rsp_t dbg_rsp,
  output hub_pkg::opb_req_t gpio_req,
  input  hub_pkg::opb_rsp_t gpio_rsp
);
  import hub_pkg::*;

  localparam int unsigned TW = $clog2(TIMEOUT + 1);

  function automatic opb_req_t gate(input opb_req_t r, input logic sel);
    opb_req_t g = r;
    g.select = r.select && sel;
    return g;
  endfunction

  logic [TW-1:0] wait_cnt;   // cycles the current request has waited
  logic          err_q;
  logic          timed_out;
  opb_rsp_t      slaves;     // OR of all slave responses

  logic [NUM_UARTS-1:0] hit_uart;
  logic hit_eth, hit_mem, hit_dbg, hit_gpio, hit_any;

  always_comb begin
    for (int k = 0; k < NUM_UARTS; k++)
      hit_uart[k] = (m_req.addr & WIN64K_MASK) == ADDR_RS232_0 - ADDR_UART_STEP * 32'(k);
    hit_eth  = (m_req.addr & WIN64K_MASK) == ADDR_ETH;
    hit_dbg  = (m_req.addr & WIN64K_MASK) == ADDR_DEBUG;
    hit_gpio = (m_req.addr & WIN64K_MASK) == ADDR_GPIO;
    hit_mem  = m_req.addr >= ADDR_MEM0_LO && m_req.addr <= ADDR_MEM0_HI;
    hit_any  = |{hit_uart, hit_eth, hit_dbg, hit_gpio, hit_mem};
  end

  for (genvar k = 0; k < NUM_UARTS; k++) begin : g_uart
    assign uart_req[k] = gate(m_req, hit_uart[k] && !timed_out);
  end
  assign eth_req  = gate(m_req, hit_eth  && !timed_out);
  assign mem_req  = gate(m_req, hit_mem  && !timed_out);
  assign dbg_req  = gate(m_req, hit_dbg  && !timed_out);
  assign gpio_req = gate(m_req, hit_gpio && !timed_out);

  // error acknowledge for unmapped addresses and for silent slaves

  always_comb begin
    slaves = eth_rsp;
    slaves.rdata   |= mem_rsp.rdata   | dbg_rsp.rdata   | gpio_rsp.rdata;
    slaves.xferack |= mem_rsp.xferack | dbg_rsp.xferack | gpio_rsp.xferack;
    slaves.errack  |= mem_rsp.errack  | dbg_rsp.errack  | gpio_rsp.errack;
    for (int k = 0; k < NUM_UARTS; k++) begin
      slaves.rdata   |= uart_rsp[k].rdata;
      slaves.xferack |= uart_rsp[k].xferack;
      slaves.errack  |= uart_rsp[k].errack;
    end
  end

  assign timed_out = (wait_cnt == TW'(TIMEOUT));

  always_ff @(posedge clk) begin
    if (rst) begin
      wait_cnt <= '0;
      err_q    <= 1'b0;
    end else begin
      err_q <= 1'b0;
      if (!m_req.select || slaves.xferack || slaves.errack || err_q) begin
        wait_cnt <= '0;
      end else if (!hit_any || timed_out) begin
        err_q    <= 1'b1;
        wait_cnt <= '0;
      end else begin
        wait_cnt <= wait_cnt + 1'b1;
      end
    end
  end

  always_comb begin
    m_rsp = slaves;
    m_rsp.errack = slaves.errack || err_q;
  end

  // bus rules: at most one answer per cycle, and the master holds a request
  // unchanged until it is answered
  opb_req_t prev_req;
  logic     prev_open;
  always_ff @(posedge clk) begin
    prev_req  <= m_req;
    prev_open <= !rst && m_req.select && !m_rsp.xferack && !m_rsp.errack;
    if (!rst) begin
      assert ($countones({slaves.xferack, err_q}) <= 1)
        else $error("opb_decoder: two answers in one cycle");
      if (prev_open)
        assert (m_req == prev_req)
          else $error("opb_decoder: request changed before it was answered");
    end
  end
endmodule
