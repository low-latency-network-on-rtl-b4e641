// fwft_fifo: small first-word-fall-through FIFO built as a shift register.
//
// The oldest entry always sits in slot 0 and is shown on `dout` with no read
// multiplexer; a pop shifts every slot down by one and a push writes the first
// free slot (the slot below it if a pop happens in the same cycle). This keeps
// the FIFO lean in logic, which matters because every input port holds
// several of them for per-packet and per-flit header information. The
// shift-register structure is this design's own; the published design asks for a
// resource-lean FWFT FIFO. Push when full and pop when empty are ignored
// (the users never do either; an assertion flags it).
module fwft_fifo #(
  parameter int W     = 8,
  parameter int DEPTH = 6
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] dout,
  output logic         empty,
  output logic         full
);

  localparam int CNTW = $clog2(DEPTH + 1);

  logic [W-1:0]    mem [DEPTH];
  logic [CNTW-1:0] count;
  logic            do_pop, do_push;

  assign empty   = (count == '0);
  assign full    = (count == CNTW'(DEPTH));
  assign dout    = mem[0];
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      for (int i = 0; i < DEPTH; i++) begin
        if (do_pop) begin
          if (do_push && (CNTW'(i) == count - 1'b1)) mem[i] <= din;
          else if (i < DEPTH - 1)                    mem[i] <= mem[i+1];
        end else if (do_push && (CNTW'(i) == count)) begin
          mem[i] <= din;
        end
      end
      count <= count + CNTW'(do_push) - CNTW'(do_pop);
    end
  end

  // Users must respect empty and full
  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) !(push && full && !pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) !(pop && empty));

endmodule
