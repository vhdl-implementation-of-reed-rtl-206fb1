// error_corrector: error memory and corrected-word read-out.
//
// The Chien/Forney stage writes one error value per position into an N-word
// error memory. On start the corrector reads the delay buffer and the error
// memory together, position 0 first, and XORs each received symbol with its
// error value. With bypass high (an uncorrectable word) the received symbols
// are given out unchanged.
//
// Interface and timing: start is sampled only while idle. fifo_re is high
// for N consecutive clocks beginning on the clock after start; each symbol
// appears on d_out (out_enb high) one clock after its fifo_re, i.e. the
// delay buffer's read latency. last is high with the N-th output symbol.
module error_corrector
  import gf_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic clk,
  input  logic reset,
  input  logic ram_we,
  input  logic [$clog2(N)-1:0] ram_addr,
  input  gf_t  ram_d_in,
  input  logic start,
  input  logic bypass,
  output logic fifo_re,
  input  gf_t  fifo_d,
  output logic out_enb,
  output gf_t  d_out,
  output logic last
);

  localparam int unsigned AW = $clog2(N);

  gf_t err_mem [N];
  gf_t err_q;
  logic [AW-1:0] rd_cnt;
  logic reading, rd_last, bypass_q;

  assign fifo_re = reading;
  assign d_out   = bypass_q ? fifo_d : (fifo_d ^ err_q);

  always_ff @(posedge clk) begin
    if (ram_we) err_mem[ram_addr] <= ram_d_in;
    if (reading) err_q <= err_mem[rd_cnt];
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      reading  <= 1'b0;
      rd_cnt   <= '0;
      rd_last  <= 1'b0;
      bypass_q <= 1'b0;
      out_enb  <= 1'b0;
      last     <= 1'b0;
    end else begin
      out_enb <= reading;
      last    <= reading && rd_last;
      if (!reading) begin
        if (start) begin
          reading  <= 1'b1;
          rd_cnt   <= '0;
          rd_last  <= (N == 1);
          bypass_q <= bypass;
        end
      end else begin
        rd_cnt  <= rd_cnt + 1'b1;
        rd_last <= (rd_cnt == AW'(N-2));
        if (rd_last) reading <= 1'b0;
      end
    end
  end

endmodule
