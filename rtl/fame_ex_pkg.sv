// fame_ex_pkg: the combinational logic of the two small target modules A and
// B used to demonstrate FAME partitioning (the source draws them only as
// clouds; their behaviour here is this design's own). Keeping the logic in
// functions lets the single-thread (FAME0/FAME1) and the multithreaded (FAME5)
// forms of B share exactly the same next-state and output logic.
//
// A: counter cnt and accumulator acc. Each target cycle it writes cnt + acc
//    into the A->B register, is ready to dequeue from the B->A queue unless
//    cnt[1:0] == 3, adds every dequeued entry to acc and increments cnt.
// B: counter sent. Each target cycle it reads the A->B register value r,
//    offers r ^ sent to the B->A queue when r is odd, and increments sent for
//    every entry the queue accepts.
package fame_ex_pkg;

  localparam int unsigned FW = 16;
  typedef logic [FW-1:0] fword_t;

  function automatic fword_t a_reg_out(fword_t cnt, fword_t acc);
    return cnt + acc;
  endfunction

  function automatic logic a_deq_ready(fword_t cnt);
    return cnt[1:0] != 2'b11;
  endfunction

  function automatic logic b_enq_valid(fword_t r);
    return r[0];
  endfunction

  function automatic fword_t b_enq_data(fword_t r, fword_t sent);
    return r ^ sent;
  endfunction

endpackage
