// tdc_channel: one TDC channel with its double (odd/even) serializer.
//
// Each rising edge of event_i stores the current counter word in one of two
// event memories, alternating between them: a divide-by-two (sel / sel_n)
// clocks the "odd" memory on the 1st, 3rd, ... event and the "even" memory
// on the 2nd, 4th, .... Each memory feeds its own 8-bit parallel-in
// serial-out register. The acquisition side chooses the talking half with
// the level rn_piso (1 = odd half, 0 = even half) and clocks the bits out
// with ck_sync; the idle half is held in reset and outputs 0, so the two
// serial lines are merged by an OR into the single channel output
// vector_o. When a half loses the line its memory receives a short clear
// pulse, so a word is never sent twice. With two memories a new event can be
// stored while the previous one is still being shifted out, so the channel
// accepts a higher event rate before words are lost.
//
// Transfer timing: after rn_piso toggles, the first ck_sync rising edge
// loads the word and puts its MSB on vector_o; each following edge presents
// the next bit, so bit k (MSB = WIDTH-1) is valid after edge WIDTH-k and
// the word takes WIDTH sync clocks. rn_piso is at once the serializers'
// asynchronous reset and data for the control flip-flops, as in the circuit,
// so the acquisition side must change it away from rising ck_sync edges
// (on a falling edge). An event that arrives while its memory is
// being read overwrites the stored word (the memory captures every edge
// routed to it), as in the circuit.
//
// Structure, signal roles and reset polarities follow the channel
// schematic. Three departures are this design's: the tri-state buffers in
// front of the memories are left out because each memory is strobed only by
// its own select edge, the memories are strobed by sel / sel_n directly
// rather than through a delay cell, and the clear-pulse delay is a ck_sync
// flip-flop.
`timescale 1ps / 1fs

module tdc_channel #(
  parameter int unsigned WIDTH = tdc_pkg::TIME_W
) (
  input  logic             rst_n,     // global reset of memories and control
  input  logic [WIDTH-1:0] count,     // shared counter word
  input  logic             event_i,   // discriminator pulse, rising edge
  input  logic             ck_sync,   // serial clock from acquisition
  input  logic             rn_piso,   // 1: odd half talks, 0: even half talks
  output logic             vector_o   // serial output to acquisition
);
  import tdc_pkg::*;

  logic             sel, sel_n;
  logic [WIDTH-1:0] word_odd, word_even;
  piso_mode_e       mode_odd, mode_even;
  logic             clr_odd_n, clr_even_n;
  logic             ser_odd, ser_even;

  odd_even_divider u_div (
    .event_i (event_i),
    .rst_n   (rst_n),
    .sel     (sel),
    .sel_n   (sel_n)
  );

  event_latch #(.WIDTH(WIDTH)) u_mem_odd (
    .stop  (sel),
    .rst_n (rst_n & clr_odd_n),
    .d     (count),
    .q     (word_odd)
  );

  event_latch #(.WIDTH(WIDTH)) u_mem_even (
    .stop  (sel_n),
    .rst_n (rst_n & clr_even_n),
    .d     (count),
    .q     (word_even)
  );

  piso_rw_ctrl u_ctrl (
    .ck_sync   (ck_sync),
    .rst_n     (rst_n),
    .rn_piso   (rn_piso),
    .mode_odd  (mode_odd),
    .mode_even (mode_even)
  );

  mem_clear_pulse u_clr_odd (
    .ck_sync (ck_sync),
    .rst_n   (rst_n),
    .mode    (mode_odd),
    .clear_n (clr_odd_n)
  );

  mem_clear_pulse u_clr_even (
    .ck_sync (ck_sync),
    .rst_n   (rst_n),
    .mode    (mode_even),
    .clear_n (clr_even_n)
  );

  piso #(.WIDTH(WIDTH)) u_ser_odd (
    .ck_out     (ck_sync),
    .rst_n      (rn_piso),
    .mode       (mode_odd),
    .d          (word_odd),
    .serial_out (ser_odd)
  );

  piso #(.WIDTH(WIDTH)) u_ser_even (
    .ck_out     (ck_sync),
    .rst_n      (~rn_piso),
    .mode       (mode_even),
    .d          (word_even),
    .serial_out (ser_even)
  );

  // Merge of the two serial lines; the idle half is held at 0.
  assign vector_o = ser_odd | ser_even;

  // Only one half may drive a 1 at any time, otherwise the OR corrupts data.
  a_one_half_talks : assert property (@(posedge ck_sync) disable iff (!rst_n) !(ser_odd && ser_even))
    else $error("both serializer halves drive the channel line");

endmodule
