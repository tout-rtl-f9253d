// fifo_chip_model: behavioural model of the external 9-bit FIFO chip, for
// testbenches only.
//
// Asynchronous-FIFO behaviour reduced to the system clock: an entry is
// written at a clock edge where fifo_WRITE_l is low and read (the read
// pointer advances) at a clock edge where fifo_READ_l is low.  fifo_OUT
// always shows the oldest entry, so it is valid during the cycle in which
// fifo_READ_l is low.  fifo_reset_l low empties the FIFO.  The flags are
// active low and follow the contents after each edge.  DEPTH is 512 entries
// by default, the size of the common 512 x 9 parts of this kind.
module fifo_chip_model #(
  parameter int unsigned DEPTH = 512
) (
  input  logic       clk,
  input  logic       fifo_reset_l,
  input  logic       fifo_WRITE_l,
  input  logic [8:0] fifo_D,
  input  logic       fifo_READ_l,
  output logic [8:0] fifo_OUT,
  output logic       fifo_EMPTY_l,
  output logic       fifo_HALF_l,
  output logic       fifo_FULL_l
);
  logic [8:0] mem[$];
  int         writes = 0, reads = 0, overflows = 0, underflows = 0;

  assign fifo_OUT     = mem.size() > 0 ? mem[0] : 9'h0;
  assign fifo_EMPTY_l = mem.size() != 0;
  assign fifo_HALF_l  = !(mem.size() > DEPTH / 2);
  assign fifo_FULL_l  = mem.size() < DEPTH;

  always @(posedge clk) begin
    if (!fifo_reset_l) begin
      mem.delete();
    end else begin
      if (!fifo_READ_l) begin
        if (mem.size() > 0) begin
          void'(mem.pop_front());
          reads++;
        end else begin
          underflows++;
        end
      end
      if (!fifo_WRITE_l) begin
        if (mem.size() < DEPTH) begin
          mem.push_back(fifo_D);
          writes++;
        end else begin
          overflows++;
        end
      end
    end
  end
endmodule
