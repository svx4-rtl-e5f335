// pipeline_ctrl: write/read control of the 46-cell analog pipeline.
//
// Every frontend clock (one sample period, 132 ns nominally) the preamp
// output of all channels is written into the cell under the write pointer,
// and the pointer moves on around the ring. A level-1 accept (`l1a`) marks
// the cell that was written `latency` samples earlier for readout. Marked
// cells are taken out of the ring: the write pointer skips them until they
// have been read out, so up to four samples can wait indefinitely while
// acquisition goes on ("dead-timeless" operation). An L1A that arrives while
// four cells are already marked is ignored and reported on `l1a_overflow`;
// it never disturbs the held cells. The oldest marked cell is presented on
// the read select; it is released when the backend has digitized and read
// it out, seen here as the falling edge of `cell_busy`.
//
// From the chip description: 46 cells, up to 4 held samples, skipping of
// marked cells until they are read out, and that extra L1As must not
// corrupt held data. This design's own choices: the latency is counted in
// written samples, found from a history of written cell indices;
// `cell_busy` comes from the backend clock domain and passes a two-flop
// synchronizer; marked cells are read out in trigger order.
//
// Interface: `wr_sel`/`rd_sel` are one-hot cell selects (the W1..W46 and
// R1..R46 switches); `wr_cell`/`rd_cell` are the same as indices. `rd_valid`
// says at least one cell is held. Latency must lie in 1..NCELL-NBUF-1; an
// L1A with a latency outside that range, or before that many samples have
// been written since reset, is ignored.
module pipeline_ctrl #(
  parameter int NCELL    = 46,
  parameter int NBUF     = 4,
  parameter int LAT_BITS = 6,
  parameter int CW       = $clog2(NCELL)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  l1a,
  input  logic [LAT_BITS-1:0]   latency,
  input  logic                  cell_busy,   // asynchronous, backend domain
  output logic [NCELL-1:0]      wr_sel,
  output logic [CW-1:0]         wr_cell,
  output logic [NCELL-1:0]      rd_sel,
  output logic [CW-1:0]         rd_cell,
  output logic                  rd_valid,
  output logic [$clog2(NBUF+1)-1:0] nheld,
  output logic                  l1a_overflow
);

  localparam int HDEPTH = NCELL - NBUF - 1;   // longest usable latency

  logic [CW-1:0]    wp;
  logic [NCELL-1:0] marked;
  logic [CW-1:0]    queue [NBUF];
  logic [$clog2(NBUF+1)-1:0] count;
  logic [CW-1:0]    hist  [HDEPTH];
  logic [HDEPTH-1:0] hist_v;
  logic [2:0]       dig_sync;

  logic             release_cell;
  logic             take;
  logic [CW-1:0]    take_cell;
  logic [NCELL-1:0] marked_next;
  logic [CW-1:0]    wp_next;

  // Falling edge of the synchronized digitize flag ends a conversion.
  assign release_cell = dig_sync[2] && !dig_sync[1] && (count != 0);

  always_comb begin
    take      = 1'b0;
    take_cell = '0;
    l1a_overflow = 1'b0;
    if (l1a && latency >= 1 && int'(latency) <= HDEPTH) begin
      take_cell = hist[latency - 1];
      if (!hist_v[latency - 1])          take = 1'b0;
      else if (count == NBUF[$bits(count)-1:0] && !release_cell) l1a_overflow = 1'b1;
      else                               take = 1'b1;
    end

    marked_next = marked;
    if (release_cell) marked_next[queue[0]] = 1'b0;
    if (take)         marked_next[take_cell] = 1'b1;

    // Next free cell after the current one; at most NBUF are marked.
    wp_next = wp;
    for (int k = NBUF + 1; k >= 1; k--) begin
      automatic int c = (int'(wp) + k) % NCELL;
      if (!marked_next[c]) wp_next = CW'(c);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp       <= '0;
      marked   <= '0;
      count    <= '0;
      hist_v   <= '0;
      dig_sync <= '0;
      for (int i = 0; i < NBUF; i++)   queue[i] <= '0;
      for (int i = 0; i < HDEPTH; i++) hist[i]  <= '0;
    end else begin
      dig_sync <= {dig_sync[1:0], cell_busy};
      wp       <= wp_next;
      marked   <= marked_next;
      hist[0]  <= wp;
      hist_v   <= {hist_v[HDEPTH-2:0], 1'b1};
      for (int i = 1; i < HDEPTH; i++) hist[i] <= hist[i-1];

      // Trigger-ordered queue of held cells.
      if (release_cell) begin
        for (int i = 0; i < NBUF - 1; i++) queue[i] <= queue[i+1];
        if (take) queue[count - 1] <= take_cell;
        count <= take ? count : count - 1'b1;
      end else if (take) begin
        queue[count[$clog2(NBUF)-1:0]] <= take_cell;
        count <= count + 1'b1;
      end
    end
  end

  always_comb begin
    wr_sel = '0;
    wr_sel[wp] = 1'b1;
    rd_sel = '0;
    if (count != 0) rd_sel[queue[0]] = 1'b1;
  end

  assign wr_cell  = wp;
  assign rd_cell  = queue[0];
  assign rd_valid = (count != 0);
  assign nheld    = count;

  // At most NBUF cells are ever out of the ring.
  a_held_limit: assert property (@(posedge clk) disable iff (!rst_n)
                                 $countones(marked) == int'(count) && int'(count) <= NBUF);
  // The write pointer never lands on a held cell.
  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n) !marked[wp]);

endmodule
