// dma_model: behavioural model of the DMA engine and the memory behind it.
//
// Not synthesizable logic of the design: it stands in for the platform's
// DMA controller and the processor's DRAM in simulation. Memory is an array
// of DEPTH words of WIDTH bits; byte address a selects word
// (a / (WIDTH/8)) mod DEPTH. A read request (rx_start high for one cycle)
// is answered RX_LAT cycles later by rx_done high for exactly one cycle,
// with rx_data valid only in that cycle (zero otherwise). A write request
// (tx_start) captures tx_data and tx_addr in the request cycle, writes the
// word and pulses tx_done TX_LAT cycles later. The defaults, 86 and 8
// cycles, are the measured average transfer times of the platform expressed
// in 100 MHz fabric cycles. Requests are ignored while resetn is low. The testbench reads and writes `mem` directly,
// as the processor does.
module dma_model #(
  parameter int unsigned WIDTH  = 1024,
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned DEPTH  = 16,
  parameter int unsigned RX_LAT = 86,
  parameter int unsigned TX_LAT = 8
) (
  input  logic              clk,
  input  logic              resetn,
  input  logic              rx_start,
  input  logic [ADDR_W-1:0] rx_addr,
  output logic              rx_done,
  output logic [WIDTH-1:0]  rx_data,
  input  logic              tx_start,
  input  logic [ADDR_W-1:0] tx_addr,
  input  logic [WIDTH-1:0]  tx_data,
  output logic              tx_done
);
  logic [WIDTH-1:0] mem [DEPTH];

  int unsigned      rx_cnt, tx_cnt;
  int unsigned      rx_idx, tx_idx;
  logic [WIDTH-1:0] tx_buf;

  function automatic int unsigned index(logic [ADDR_W-1:0] a);
    return int'((a / (WIDTH / 8)) % DEPTH);
  endfunction

  initial begin
    rx_done = 1'b0;
    tx_done = 1'b0;
    rx_data = '0;
    rx_cnt  = 0;
    tx_cnt  = 0;
    rx_idx  = 0;
    tx_idx  = 0;
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  always @(posedge clk) begin
    rx_done <= 1'b0;
    rx_data <= '0;
    if (!resetn) begin
      rx_cnt <= 0;
    end else if (rx_start) begin
      rx_idx <= index(rx_addr);
      rx_cnt <= RX_LAT;
    end else if (rx_cnt == 1) begin
      rx_done <= 1'b1;
      rx_data <= mem[rx_idx];
      rx_cnt  <= 0;
    end else if (rx_cnt != 0) begin
      rx_cnt <= rx_cnt - 1;
    end
  end

  always @(posedge clk) begin
    tx_done <= 1'b0;
    if (!resetn) begin
      tx_cnt <= 0;
    end else if (tx_start) begin
      tx_idx <= index(tx_addr);
      tx_buf <= tx_data;
      tx_cnt <= TX_LAT;
    end else if (tx_cnt == 1) begin
      mem[tx_idx] <= tx_buf;
      tx_done     <= 1'b1;
      tx_cnt      <= 0;
    end else if (tx_cnt != 0) begin
      tx_cnt <= tx_cnt - 1;
    end
  end
endmodule
