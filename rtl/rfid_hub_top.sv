// rfid_hub_top: the RFID hub fabric in one FPGA.
//
// One hub serves several RFID readers at once, each on its own serial line,
// and reports to a server PC over 10BaseT Ethernet. The readers' UARTs
// (uart_core, 38400 baud 8-O-1, NUM_UARTS of them; the hub's main build has 4
// and the design allows up to 8) and the Ethernet core (eth_core) sit on the
// processor's peripheral bus behind the address decoder (opb_decoder).
// The processor itself, its local memories, the debug module, the
// general-purpose I/O and the external SRAM controller are existing cores that
// this RTL does not contain: the processor's bus master port comes in as
// m_req/m_rsp, and the bus slave ports of the debug module, GPIO and SRAM
// controller go out as dbg_*/gpio_*/mem_*.
// Serial lines: uart_rxd[k]/uart_txd[k] go to reader k (RS232-TTL levels);
// reader 0 is the UART called RS232 at 0x40660000, reader k sits 0x20000*k
// lower. Ethernet: eth_rxd from the external differential receiver, txdp/txdm
// to the line transformer. One clock, clk, at CLK_HZ (48 MHz) for everything.
// Reset is synchronous and active high.
module rfid_hub_top #(
  parameter int unsigned CLK_HZ       = 48_000_000,
  parameter int unsigned NUM_UARTS    = 4,
  parameter int unsigned BAUD         = 38_400,
  parameter int unsigned ETH_RX_BYTES = 2048,
  parameter int unsigned ETH_TX_BYTES = 2048,
  parameter int unsigned NLP_PERIOD   = CLK_HZ / 1000 * 16
) (
  input  logic                 clk,
  input  logic                 rst,
  // processor bus master
  input  hub_pkg::opb_req_t    m_req,
  output hub_pkg::opb_rsp_t    m_rsp,
  // bus slaves outside this RTL
  output hub_pkg::opb_req_t    mem_req,
  input  hub_pkg::opb_rsp_t    mem_rsp,
  output hub_pkg::opb_req_t    dbg_req,
  input  hub_pkg::opb_rsp_t    dbg_rsp,
  output hub_pkg::opb_req_t    gpio_req,
  input  hub_pkg::opb_rsp_t    gpio_rsp,
  // RFID readers
  input  logic [NUM_UARTS-1:0] uart_rxd,
  output logic [NUM_UARTS-1:0] uart_txd,
  // Ethernet
  input  logic                 eth_rxd,
  output logic                 eth_txdp,
  output logic                 eth_txdm
);
  import hub_pkg::*;

  opb_req_t uart_req [NUM_UARTS];
  opb_rsp_t uart_rsp [NUM_UARTS];
  opb_req_t eth_req;
  opb_rsp_t eth_rsp;

  opb_decoder #(.NUM_UARTS(NUM_UARTS)) u_bus (
    .clk, .rst, .m_req, .m_rsp,
    .uart_req, .uart_rsp, .eth_req, .eth_rsp,
    .mem_req, .mem_rsp, .dbg_req, .dbg_rsp, .gpio_req, .gpio_rsp
  );

  for (genvar k = 0; k < NUM_UARTS; k++) begin : g_uart
    uart_core #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_uart (
      .clk, .rst, .req(uart_req[k]), .rsp(uart_rsp[k]),
      .rxd(uart_rxd[k]), .txd(uart_txd[k])
    );
  end

  eth_core #(
    .CLK_HZ(CLK_HZ), .RX_BYTES(ETH_RX_BYTES), .TX_BYTES(ETH_TX_BYTES),
    .NLP_PERIOD(NLP_PERIOD)
  ) u_eth (
    .clk, .rst, .req(eth_req), .rsp(eth_rsp),
    .rxd(eth_rxd), .txdp(eth_txdp), .txdm(eth_txdm)
  );

  initial assert (NUM_UARTS >= 1 && NUM_UARTS <= 8)
    else $error("rfid_hub_top: the hub serves 1 to 8 readers");
endmodule
