// pcdr_top: digital clock and data recovery of a wirelessly powered neural
// recording implant.
//
// The implant receives one amplitude-modulated 2.64 MHz carrier that carries its
// power, its clock and its configuration data. The analog front end (rectifier,
// bandgap, regulator, Schmitt trigger and AM demodulator) stays outside this
// module; its two digital outputs are the inputs here:
//   carrier_sq  the Schmitt-trigger output, one pulse per carrier cycle;
//   demod_data  the demodulator comparator output, high while the envelope is
//               above its average.
// clock_recovery makes clk_1m32 (carrier/2, 50% duty) and clk_330k (carrier/8).
// All data recovery runs on clk_330k. edge_dt_counter samples each bit 16 clocks
// after the rising edge of its pulse (short pulse = 0, long pulse = 1).
// header_bitcount waits for four ones, then passes the next 128 samples as
// shift pulses to shift_load_chain and ends the frame with update, which loads
// the CFG_BITS working registers on cfg in parallel.
//
// Interface: rst_n is an asynchronous active-low reset for all flip-flops.
// armed (a pulse edge was seen and delta-t is being counted), sample, rx_bit
// (the synchronized data; the recovered bit while sample is high), shift,
// update and header_found are brought out for observation and are synchronous
// to clk_330k; cfg changes on the clk_330k edge that ends the update pulse.
// cfg_sout is the last cell's shift stage.
//
// The block structure and its numbers follow the published design; the power
// front end is analog and is not part of this RTL.
module pcdr_top #(
  parameter int unsigned CFG_BITS = pcdr_pkg::CFG_BITS
) (
  input  logic                carrier_sq,
  input  logic                rst_n,
  input  logic                demod_data,
  output logic                clk_1m32,
  output logic                clk_330k,
  output logic                armed,
  output logic                sample,
  output logic                rx_bit,
  output logic                shift,
  output logic                update,
  output logic                header_found,
  output logic [CFG_BITS-1:0] cfg,
  output logic                cfg_sout
);

  logic data_sync;

  assign rx_bit = data_sync;

  clock_recovery u_clk (
    .carrier (carrier_sq),
    .rst_n   (rst_n),
    .clk_half(clk_1m32),
    .clk_slow(clk_330k)
  );

  edge_dt_counter u_edge (
    .clk      (clk_330k),
    .rst_n    (rst_n),
    .data     (demod_data),
    .data_sync(data_sync),
    .busy     (armed),
    .dt       (sample)
  );

  header_bitcount u_hdr (
    .clk         (clk_330k),
    .rst_n       (rst_n),
    .dt          (sample),
    .data        (data_sync),
    .shift       (shift),
    .update      (update),
    .header_found(header_found)
  );

  shift_load_chain #(.N(CFG_BITS)) u_chain (
    .clk  (clk_330k),
    .rst_n(rst_n),
    .shift(shift),
    .load (update),
    .din  (data_sync),
    .cfg  (cfg),
    .sout (cfg_sout)
  );

endmodule
