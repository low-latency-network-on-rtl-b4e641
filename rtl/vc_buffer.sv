// vc_buffer: the V virtual-channel buffers of one input port, merged into a
// single dual-port memory.
//
// VC v owns memory words v*B .. v*B+B-1 and has its own write and read
// pointers; the write port takes the incoming flit at the address of its VC's
// write pointer and the read port reads the head of the VC chosen by the
// allocator. This removes the per-VC demultiplexer and multiplexer that
// separate buffers would need (the FPGA optimisation of the published design). Because the
// memory read is registered, the hdr and tail flags of every VC's head flit
// are also kept in a per-VC FWFT FIFO so allocation can see them at once.
//
// Interface: wr_en/wr_vc (one-hot)/wr_data in; rd_en/rd_vc (one-hot) in,
// rd_data valid the cycle after rd_en. nonempty, head_hdr and head_tail per
// VC. Data word = {hdr, tail, payload}. The upstream credit protocol
// guarantees a VC is never written when full.
module vc_buffer #(
  parameter int V    = 4,
  parameter int B    = 4,
  parameter int FPAY = 32
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            wr_en,
  input  logic [V-1:0]    wr_vc,
  input  logic [FPAY+1:0] wr_data,
  input  logic            rd_en,
  input  logic [V-1:0]    rd_vc,
  output logic [FPAY+1:0] rd_data,
  output logic [V-1:0]    nonempty,
  output logic [V-1:0]    head_hdr,
  output logic [V-1:0]    head_tail
);

  localparam int AW = $clog2(V * B);
  localparam int PTW = (B > 1) ? $clog2(B) : 1;

  logic [PTW-1:0] wr_ptr [V];
  logic [PTW-1:0] rd_ptr [V];
  logic [AW-1:0]  wr_addr, rd_addr;
  logic [V-1:0]   flag_empty, flag_full;
  logic [1:0]     flag_dout [V];

  // One-hot VC to memory address
  always_comb begin
    wr_addr = '0;
    rd_addr = '0;
    for (int v = 0; v < V; v++) begin
      if (wr_vc[v]) wr_addr = AW'(v * B) + AW'(wr_ptr[v]);
      if (rd_vc[v]) rd_addr = AW'(v * B) + AW'(rd_ptr[v]);
    end
  end

  dp_ram #(.DW(FPAY + 2), .DEPTH(V * B)) u_ram (
    .clk     (clk),
    .wr_en   (wr_en),
    .wr_addr (wr_addr),
    .wr_data (wr_data),
    .rd_en   (rd_en),
    .rd_addr (rd_addr),
    .rd_data (rd_data)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int v = 0; v < V; v++) begin
        wr_ptr[v] <= '0;
        rd_ptr[v] <= '0;
      end
    end else begin
      for (int v = 0; v < V; v++) begin
        if (wr_en && wr_vc[v])
          wr_ptr[v] <= (wr_ptr[v] == PTW'(B - 1)) ? '0 : wr_ptr[v] + 1'b1;
        if (rd_en && rd_vc[v])
          rd_ptr[v] <= (rd_ptr[v] == PTW'(B - 1)) ? '0 : rd_ptr[v] + 1'b1;
      end
    end
  end

  // Per-VC flags of the buffered flits, head first
  for (genvar v = 0; v < V; v++) begin : g_flags
    fwft_fifo #(.W(2), .DEPTH(B)) u_flags (
      .clk   (clk),
      .rst   (rst),
      .push  (wr_en && wr_vc[v]),
      .din   (wr_data[FPAY+1:FPAY]),
      .pop   (rd_en && rd_vc[v]),
      .dout  (flag_dout[v]),
      .empty (flag_empty[v]),
      .full  (flag_full[v])
    );
    assign nonempty[v]  = !flag_empty[v];
    assign head_hdr[v]  = flag_dout[v][1];
    assign head_tail[v] = flag_dout[v][0];
  end

  a_rd_onehot: assert property (@(posedge clk) disable iff (rst) rd_en |-> $onehot(rd_vc));
  a_wr_onehot: assert property (@(posedge clk) disable iff (rst) wr_en |-> $onehot(wr_vc));
  a_no_overrun: assert property (@(posedge clk) disable iff (rst)
                                 wr_en |-> ((wr_vc & flag_full) == '0) || (rd_en && rd_vc == wr_vc));

endmodule
