// transpose_unit: 8x8 transpose memory between the row and column passes.
//
// The row pass delivers a block as eight frames (rows u = 0..7, one after the
// other), each in the 1-D output order, so row-frame slot p belongs to column
// out_order(p).  The column pass wants eight frames (columns n = 0..7), each
// holding the rows in the 1-D input order in_order(k).  Both orders are
// absorbed in the addresses, so no further reordering is needed.
//
// Two 64-word banks are used ping-pong: while one is written the other is
// read.  Writing follows the incoming valid samples; a row ends with slot 7
// and a block with the eighth row.  A full bank is read one word per cycle,
// 64 cycles without gaps, starting the cycle after it was completed (or as
// soon as the previous read ends).  Since a block takes at least 64 cycles to
// write, the reader always frees a bank before the writer needs it again.
//
// Timing: out_data and out_tag are registered (memory read latency 1).  The
// last sample of a block leaves 2 cycles after it entered; the first leaves
// 65 cycles after it entered when the input streams without gaps.
// Reset (synchronous, active low) empties both banks.
module transpose_unit
  import idct_pkg::*;
#(
  parameter int unsigned W = 17
) (
  input  logic                clk,
  input  logic                rst_n,
  input  tag_t                in_tag,
  input  logic signed [W-1:0] in_data,
  output tag_t                out_tag,
  output logic signed [W-1:0] out_data
);

  logic signed [W-1:0] mem [2][N*N];

  logic       wr_bank, rd_bank, reading;
  logic [2:0] wr_row;
  logic [5:0] rd_cnt;
  logic [1:0] full;

  logic [5:0] wr_addr, rd_addr;
  logic       wr_last, rd_start, rd_last;

  // Address = row*8 + column.
  assign wr_addr  = {wr_row, 3'(out_order(int'(in_tag.slot)))};
  assign rd_addr  = {3'(in_order(int'(rd_cnt[2:0]))), rd_cnt[5:3]};
  assign wr_last  = in_tag.valid && in_tag.slot == 3'd7 && wr_row == 3'd7;
  assign rd_start = !reading && full[rd_bank];
  assign rd_last  = reading && rd_cnt == 6'd63;

  always_ff @(posedge clk) begin
    if (in_tag.valid) mem[wr_bank][wr_addr] <= in_data;
    out_data <= mem[rd_bank][rd_addr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_bank <= 1'b0;
      wr_row  <= '0;
      rd_bank <= 1'b0;
      reading <= 1'b0;
      rd_cnt  <= '0;
      full    <= '0;
      out_tag <= '0;
    end else begin
      // write side
      if (in_tag.valid && in_tag.slot == 3'd7) wr_row <= wr_row + 3'd1;
      if (wr_last) wr_bank <= !wr_bank;

      // read side
      out_tag.valid <= reading;
      out_tag.slot  <= rd_cnt[2:0];
      if (rd_start) reading <= 1'b1;
      if (reading) rd_cnt <= rd_cnt + 6'd1;
      if (rd_last) begin
        // go straight on with the other bank if it is (or just became) full
        reading <= full[!rd_bank] || (wr_last && wr_bank == !rd_bank);
        rd_bank <= !rd_bank;
      end

      // bank status: set by the writer, cleared by the reader
      for (int bnk = 0; bnk < 2; bnk++) begin
        if (wr_last && wr_bank == bnk[0])      full[bnk] <= 1'b1;
        else if (rd_last && rd_bank == bnk[0]) full[bnk] <= 1'b0;
      end
    end
  end

  // The writer must never complete a bank the reader still owns.
  always_ff @(posedge clk)
    if (rst_n) assert (!(wr_last && full[wr_bank]))
      else $error("transpose_unit: bank %0d overwritten before it was read", wr_bank);

endmodule
