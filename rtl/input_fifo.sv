// input_fifo: the input FIFO that feeds cache lines to the sixteen byte
// columns.
//
// A line is 16 bytes of 11 bits (data plus used, branch and target marks).
// Lines are shifted in one bit at a time through a 176-bit scan register
// (scan_en/scan_in; the first bit in ends up as bit 0 of byte 0) and written
// into the FIFO with load_line; par_load writes a whole line from par_line
// in one clock instead (used by the self-test). Every byte position has its own read
// pointer and count, so the store acts as sixteen parallel 11-bit FIFOs and
// each column takes its next byte as soon as it has consumed the last one,
// without waiting for the other columns. Reads are enabled by run.
//
// With recirc set the FIFO is read cyclically: a pop moves a column's read
// pointer on through the lines loaded since reset and wraps back to the
// first, without removing anything, so a short program can be replayed for
// as long as wanted. With recirc clear a pop removes the byte. The depth of
// 32 lines, the serial loading, the per-byte FIFOs and the cyclic mode follow
// the source; the scan register layout and the control pins are this
// design's. Timing: a line loaded in cycle t can be read from t+1; col_data
// is valid in the cycle col_valid is high and the pop is taken at the edge.
module input_fifo
  import rappid_pkg::*;
#(
  parameter int DEPTH = 32  // lines
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 scan_en,
  input  logic                 scan_in,
  output logic                 scan_out,
  input  logic                 load_line,
  input  logic                 par_load,    // write par_line instead (self-test)
  input  if_byte_t [NCOL-1:0]  par_line,
  input  logic                 recirc,
  input  logic                 run,
  output logic                 full,
  input  logic [NCOL-1:0]      col_pop,
  output logic [NCOL-1:0]      col_valid,
  output if_byte_t [NCOL-1:0]  col_data
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int LW = NCOL * $bits(if_byte_t);

  logic [LW-1:0]   scan_q;
  if_byte_t        mem [NCOL][DEPTH];
  logic [AW-1:0]   wr_q;
  logic [AW:0]     nload_q;             // lines loaded since reset, saturating
  logic [AW-1:0]   rd_q  [NCOL];
  logic [AW:0]     cnt_q [NCOL];
  logic            do_load;
  if_byte_t [NCOL-1:0] line;

  assign line     = par_load ? par_line : scan_q;
  assign scan_out = scan_q[0];

  // A line is written only when every column has room for it.
  always_comb begin
    full = recirc && nload_q == (AW+1)'(DEPTH);
    for (int c = 0; c < NCOL; c++)
      if (cnt_q[c] == (AW+1)'(DEPTH)) full = 1'b1;
    do_load = (load_line || par_load) && !full;
  end

  logic [NCOL-1:0] pop;
  always_comb begin
    for (int c = 0; c < NCOL; c++) begin
      col_valid[c] = run && (recirc ? (nload_q != '0) : (cnt_q[c] != '0));
      col_data[c]  = mem[c][rd_q[c]];
      pop[c]       = col_pop[c] && col_valid[c];
    end
  end

  always_ff @(posedge clk) begin
    if (do_load)
      for (int c = 0; c < NCOL; c++) mem[c][wr_q] <= line[c];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scan_q  <= '0;
      wr_q    <= '0;
      nload_q <= '0;
      for (int c = 0; c < NCOL; c++) begin
        rd_q[c]  <= '0;
        cnt_q[c] <= '0;
      end
    end else begin
      if (scan_en) scan_q <= {scan_in, scan_q[LW-1:1]};
      if (do_load) begin
        wr_q <= (wr_q == AW'(DEPTH - 1)) ? '0 : wr_q + 1'b1;
        if (nload_q != (AW+1)'(DEPTH)) nload_q <= nload_q + 1'b1;
      end
      for (int c = 0; c < NCOL; c++) begin
        if (pop[c]) begin
          if (recirc)
            rd_q[c] <= ((AW+1)'(rd_q[c]) + 1'b1 == nload_q) ? '0 : rd_q[c] + 1'b1;
          else
            rd_q[c] <= (rd_q[c] == AW'(DEPTH - 1)) ? '0 : rd_q[c] + 1'b1;
        end
        cnt_q[c] <= cnt_q[c] + (AW+1)'(do_load) - (AW+1)'(pop[c] && !recirc);
      end
    end
  end

endmodule
