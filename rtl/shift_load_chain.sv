// shift_load_chain: the chip's configuration registers, N shift-load cells in a
// serial chain.
//
// Recovered bits enter cell 0 on each shift pulse and move one cell further on
// every later shift; the bit in cell N-1 leaves at sout. After a frame has been
// shifted in, a load pulse copies every shift stage into its working stage in
// parallel, and cfg presents the working stages. A frame may carry more bits
// than the chain has cells: the earliest bits then drop out at sout, so they act
// as spacer bits. After a frame of F >= N bits b[0] (first) .. b[F-1] (last),
// cfg[i] = b[F-1-i].
//
// Interface: clk, rst_n (asynchronous, active low), shift and load (one-clock
// enables), din (the recovered bit, valid with shift), cfg[N-1:0], sout.
// cfg changes on the clock edge where load is high; a shift and a load in the
// same cycle load the old shift contents.
//
// The cell structure and the parallel load follow the published circuit. The
// ordering of the chain and the width of N = 95 (given as about 95) are this
// design's reading of it.
module shift_load_chain #(
  parameter int unsigned N = pcdr_pkg::CFG_BITS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift,
  input  logic         load,
  input  logic         din,
  output logic [N-1:0] cfg,
  output logic         sout
);

  logic [N:0] link;

  assign link[0] = din;
  assign sout    = link[N];

  for (genvar i = 0; i < N; i++) begin : g_cell
    shift_load_cell u_cell (
      .clk  (clk),
      .rst_n(rst_n),
      .shift(shift),
      .load (load),
      .sin  (link[i]),
      .sout (link[i+1]),
      .q    (cfg[i])
    );
  end

endmodule
