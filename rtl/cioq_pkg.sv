// cioq_pkg: constants and types shared by the CIOQ switch modules.
//
// The defaults describe the switch built here: a 32 x 32 combined input and
// output queued (CIOQ) switch with a speedup of four, run by the Most Urgent
// Cell First algorithm (MUCFA). A speedup of four is the value for which
// MUCFA is known to make the switch behave exactly like a FIFO output-queued
// switch; 32 ports is the example port count used when motivating the design.
// Cell payload width and the queue capacities are this design's own choices:
// the algorithm assumes unbounded buffers and opaque cells.
package cioq_pkg;

  // Number of ports (N x N switch).
  parameter int unsigned N_PORTS_DEF   = 32;
  // Speedup S: matching phases (fabric transfers) per time slot.
  parameter int unsigned SPEEDUP_DEF   = 4;
  // Cell payload width in bits (opaque to the switch).
  parameter int unsigned CELL_W_DEF    = 32;
  // Capacity of one output queue of the reference output-queued switch; also
  // the depth of every VOQ and every CIOQ output buffer.
  parameter int unsigned QMAX_DEF      = 16;

  // Width of a time-slot stamp. Departure times are kept modulo 2**TW and
  // compared as signed differences, so TW must exceed log2(QMAX) by two.
  function automatic int unsigned stamp_width(int unsigned qmax);
    return $clog2(qmax) + 2;
  endfunction

  // Index width that stays legal for a single port.
  function automatic int unsigned idx_width(int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

  // Steps of one time slot in the switch sequencer.
  typedef enum logic [1:0] {
    ST_ARRIVE = 2'd0,   // sample arriving cells, stamp and enqueue them
    ST_MATCH  = 2'd1,   // MUCFA matching iterations of the current phase
    ST_XFER   = 2'd2,   // move the matched cells through the fabric
    ST_DEPART = 2'd3    // send due cells on the output lines
  } slot_state_e;

endpackage
