// pkt_fifo: packet cache between the receive and send paths.
//
// A synchronous FIFO of DATA_W-bit words held in a memory array. Writes go to
// a tentative write pointer; only `commit` makes them visible to the reader,
// and `rollback` throws away every word written since the last commit. This
// lets the receive path store a frame's data while it arrives and discard it
// if the frame turns out bad (CRC error, wrong address, overflow).
//
// Interface: wr_en/wr_data write one word; a write to a full FIFO is dropped
// and sets `ovf`, which stays set until the next commit or rollback. rd_en
// pops one committed word; rd_data is registered and holds the popped word
// from the clock after rd_en until the next pop. `empty` and `rd_count` count
// committed, unread words only. Commit and rollback take effect at the clock
// edge; a write in the same cycle as commit is included in it.
//
// The document says only that a FIFO caches a single packet of data; the
// commit/rollback scheme and the depth (enough for the 1472-byte maximum
// UDP data of one frame) are this design's choice.
module pkt_fifo #(
  parameter int DATA_W = 32,
  parameter int DEPTH  = 512
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_en,
  input  logic [DATA_W-1:0] wr_data,
  input  logic              commit,
  input  logic              rollback,
  input  logic              rd_en,
  output logic [DATA_W-1:0] rd_data,
  output logic              empty,
  output logic              full,
  output logic              ovf,
  output logic [$clog2(DEPTH):0] rd_count
);

  localparam int AW = $clog2(DEPTH);

  logic [DATA_W-1:0] mem [DEPTH];
  logic [AW:0] wr_ptr, wr_ptr_c, rd_ptr;

  logic do_wr, do_rd;
  logic [AW:0] wr_ptr_nx;

  assign full     = (wr_ptr - rd_ptr) == (AW+1)'(DEPTH);
  assign rd_count = wr_ptr_c - rd_ptr;
  assign empty    = (rd_count == '0);
  assign do_wr    = wr_en && !full && !rollback;
  assign do_rd    = rd_en && !empty;
  assign wr_ptr_nx = wr_ptr + (AW+1)'(do_wr);

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      wr_ptr_c <= '0;
      rd_ptr   <= '0;
      ovf      <= 1'b0;
      rd_data  <= '0;
    end else begin
      if (rollback) begin
        wr_ptr <= wr_ptr_c;
        ovf    <= 1'b0;
      end else begin
        wr_ptr <= wr_ptr_nx;
        if (commit) begin
          wr_ptr_c <= wr_ptr_nx;
          ovf      <= 1'b0;
        end else if (wr_en && full) begin
          ovf <= 1'b1;
        end
      end
      if (do_rd) begin
        rd_data <= mem[rd_ptr[AW-1:0]];
        rd_ptr  <= rd_ptr + 1'b1;
      end
    end
  end

  // rd_en on an empty FIFO is ignored; the design above never does it
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> !empty)
    else $error("pkt_fifo: read while empty");

endmodule
