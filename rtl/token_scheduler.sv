// token_scheduler: Token Triggered Threading (T3) issue control.
// One thread issues per clock cycle. A token names the thread that issues in
// the current cycle; on every clock edge it passes to the successor that a
// programmable next-thread table gives for the current holder, so the order
// may be sequential, even/odd or any other cycle. After reset the table
// holds the order T0, T7, T2, T5, T4, T3, T6, T1 and back to T0, shown in the
// processor description, and the token is at T0.
// The table is written through cfg_we / cfg_thread / cfg_next; a write takes
// effect for the next hand-over of the token. If the written table is not
// a single cycle through all NT threads, a thread can issue again before its
// previous result is written back: that is the programmer's responsibility,
// as in the processor (there is no dependency checking).
module token_scheduler #(
  parameter int unsigned NT = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cfg_we,
  input  logic [$clog2(NT)-1:0] cfg_thread,
  input  logic [$clog2(NT)-1:0] cfg_next,
  output logic [$clog2(NT)-1:0] token        // thread issuing this cycle
);
  localparam int unsigned TW = $clog2(NT);

  logic [TW-1:0] next_tbl [NT];

  // Reset order: for NT = 8 the published sequence, otherwise round robin.
  function automatic logic [TW-1:0] reset_next(input int unsigned t);
    int unsigned order [8] = '{0, 7, 2, 5, 4, 3, 6, 1};
    if (NT == 8) begin
      for (int unsigned i = 0; i < 8; i++)
        if (order[i] == t) return TW'(order[(i+1) % 8]);
      return '0;
    end
    return TW'((t + 1) % NT);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned t = 0; t < NT; t++) next_tbl[t] <= reset_next(t);
      token <= '0;
    end else begin
      token <= next_tbl[token];
      if (cfg_we) next_tbl[cfg_thread] <= cfg_next;
    end
  end
endmodule
