// frame_fifo: FIFO1, between the SM4 decryptor and the kernel. Decrypted
// blocks are written as they leave the crypto pipeline, before the frame's
// MAC has been checked, so the FIFO keeps two write pointers: wr_ptr, where
// the next block goes, and com_ptr, the end of the last verified frame. The
// read side (the kernel) only sees entries up to com_ptr. When the MAC
// verifier passes a frame it pulses commit (com_ptr <= wr_ptr); when the
// frame fails it pulses drop and every block of that frame is discarded
// (wr_ptr <= com_ptr). A write in the same cycle as commit is included in the
// commit; a write in the same cycle as drop is discarded.
//
// free is the space left for new writes, so a writer can reserve room for a
// whole frame before it starts. Read side: valid/ready, first word falls
// through. Single clock; DEPTH must be a power of two.
module frame_fifo #(
  parameter int unsigned WIDTH = 129,
  parameter int unsigned DEPTH = 1024
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   wr_en,
  input  logic [WIDTH-1:0]       wr_data,
  input  logic                   commit,
  input  logic                   drop,
  output logic [$clog2(DEPTH):0] free,
  output logic                   rd_valid,
  input  logic                   rd_ready,
  output logic [WIDTH-1:0]       rd_data
);
  localparam int unsigned AW = $clog2(DEPTH);

  if (DEPTH != (1 << AW)) begin : g_depth_check
    $error("DEPTH must be a power of two");
  end

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wr_ptr, com_ptr, rd_ptr, wr_next;
  logic             do_wr, do_rd;

  assign free     = (AW + 1)'(DEPTH) - (wr_ptr - rd_ptr);
  assign do_wr    = wr_en && free != '0 && !drop;
  assign rd_valid = com_ptr != rd_ptr;
  assign do_rd    = rd_valid && rd_ready;
  assign rd_data  = mem[rd_ptr[AW-1:0]];
  assign wr_next  = do_wr ? wr_ptr + 1'b1 : wr_ptr;

  always_ff @(posedge clk) if (do_wr) mem[wr_ptr[AW-1:0]] <= wr_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr  <= '0;
      com_ptr <= '0;
      rd_ptr  <= '0;
    end else begin
      if (drop) wr_ptr <= com_ptr;
      else      wr_ptr <= wr_next;
      if (commit && !drop) com_ptr <= wr_next;
      if (do_rd) rd_ptr <= rd_ptr + 1'b1;
    end
  end

  a_no_overflow:    assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> free != '0);
  a_commit_or_drop: assert property (@(posedge clk) disable iff (!rst_n) !(commit && drop));
endmodule
