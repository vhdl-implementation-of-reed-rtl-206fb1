// fifo_delay: delay buffer for the received word.
//
// While the decoder computes the error values, the N received symbols of the
// block wait here. It is a FIFO built on an N-word RAM with a write counter
// and a read counter that both wrap at N; a symbol count tells how many are
// held. Reads are synchronous (RAM-style): the symbol requested with fifo_re
// appears on d_out on the next clock. Writing into a full buffer or reading
// an empty one is a usage error, caught by assertions.
//
// Interface: fifo_we/fifo_in write one symbol per clock; fifo_re reads one
// symbol per clock; count is the number of symbols held.
module fifo_delay
  import gf_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic clk,
  input  logic reset,
  input  logic fifo_we,
  input  gf_t  fifo_in,
  input  logic fifo_re,
  output gf_t  d_out,
  output logic [$clog2(N+1)-1:0] count
);

  localparam int unsigned AW = $clog2(N);

  gf_t mem [N];
  logic [AW-1:0] wr_addr, rd_addr;

  function automatic logic [AW-1:0] next_addr(logic [AW-1:0] a);
    return (a == AW'(N-1)) ? '0 : a + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (fifo_we) mem[wr_addr] <= fifo_in;
    if (fifo_re) d_out <= mem[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      wr_addr <= '0;
      rd_addr <= '0;
      count   <= '0;
    end else begin
      if (fifo_we) wr_addr <= next_addr(wr_addr);
      if (fifo_re) rd_addr <= next_addr(rd_addr);
      count <= count + ($bits(count))'(fifo_we) - ($bits(count))'(fifo_re);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (reset)
                    fifo_we && !fifo_re |-> count < ($bits(count))'(N));
  a_no_underflow: assert property (@(posedge clk) disable iff (reset)
                    fifo_re |-> count != '0);

endmodule
