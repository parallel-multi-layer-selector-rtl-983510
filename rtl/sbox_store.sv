// sbox_store: the S-box table. Collects the selector's bytes into a 16x16
// (256-entry) table, keeping only values not already in it, and then serves
// substitution lookups S(a) = table[a].
//
// How it works: a 256-bit 'seen' vector marks the byte values stored so far.
// A byte offered on wr_valid is written at the next free position (count)
// only if its 'seen' bit is clear; otherwise it is dropped and counted as a
// repeat. After 256 distinct values the table is a permutation of 0..255
// (bijective by construction) and full is raised; further writes are
// ignored. clear empties the table for a new attempt.
// Rejecting repeated values follows the specification's "store the
// non-repeated numbers"; the table order (order of first appearance) and
// the lookup port are this design's choices.
//
// Timing: a write takes effect at the clock edge; full/count follow one
// cycle later. Lookup: rd_en with rd_addr gives rd_data and rd_valid one
// cycle later. Synchronous active-low reset.
module sbox_store
  import pmls_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,      // empty the table
  input  logic        wr_valid,   // candidate byte present
  input  byte_t       wr_data,
  output logic        full,       // 256 distinct bytes stored
  output logic [8:0]  count,      // entries stored (0..256)
  output logic [15:0] repeats,    // candidates rejected as repeats (saturating)
  input  logic        rd_en,      // substitution lookup
  input  byte_t       rd_addr,
  output byte_t       rd_data,
  output logic        rd_valid
);

  byte_t        table_mem [256];
  logic [255:0] seen_q;
  logic [8:0]   count_q;
  logic [15:0]  rep_q;
  logic         accept;

  assign accept = wr_valid && !count_q[8] && !seen_q[wr_data];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      seen_q  <= '0;
      count_q <= '0;
      rep_q   <= '0;
    end else if (clear) begin
      seen_q  <= '0;
      count_q <= '0;
      rep_q   <= '0;
    end else if (wr_valid && !count_q[8]) begin
      if (accept) begin
        seen_q[wr_data] <= 1'b1;
        count_q         <= count_q + 9'd1;
      end else if (rep_q != 16'hFFFF) begin
        rep_q <= rep_q + 16'd1;
      end
    end
  end

  // table memory: write port at the fill position, registered read port
  always_ff @(posedge clk) begin
    if (accept && !clear) table_mem[count_q[7:0]] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_data  <= '0;
      rd_valid <= 1'b0;
    end else begin
      rd_valid <= rd_en;
      if (rd_en) rd_data <= table_mem[rd_addr];
    end
  end

  assign full    = count_q[8];
  assign count   = count_q;
  assign repeats = rep_q;

endmodule
