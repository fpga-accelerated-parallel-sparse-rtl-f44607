// pe_controller: the global PE Controller of the multi-PE engine.
//
// It runs one numeric factorization of an n x n matrix whose data the host
// driver has already loaded into the caches. Columns are owned round-robin:
// column k lives in the cache of PE (k mod NUM_PE) and is factorized by that
// PE, in increasing k. When a PE is idle and asks for work (pe_req), the
// controller hands it its next column with a one-clock assign_valid pulse;
// the PE pulses col_done when the column is written back. The controller
// counts finished columns per PE, which answers the question every PE asks
// before it reads an earlier column j of L: column j is finished when PE
// (j mod NUM_PE) has finished more than j / NUM_PE columns (qry_ready,
// combinational). When all n columns are finished it pulses done, reports
// the run length in cycles and returns to its initial state, ready for the
// next load and start (repeated factorizations with new values). The
// document names this controller and its control bus; the static
// round-robin column ownership and the counters are this design's choices.
// NUM_PE must be a power of two.
module pe_controller
  import lu_pkg::*;
#(
  parameter int NUM_PE = 16,
  localparam int CW = ROW_W + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,        // pulse, accepted while !busy
  input  logic [CW-1:0] n_cols,
  output logic          busy,
  output logic          done,         // one-clock pulse at the end of a run
  output logic [31:0]   cycles,       // length of the last run
  output logic          run,          // PEs may leave their initial state
  // per PE control bus
  input  logic          pe_req     [NUM_PE],
  output logic          assign_valid [NUM_PE],
  output row_t          assign_col [NUM_PE],
  input  logic          col_done   [NUM_PE],
  input  row_t          qry_col    [NUM_PE],
  output logic          qry_ready  [NUM_PE]
);

  logic [CW-1:0] issued_q [NUM_PE];     // columns handed to each PE
  logic [CW-1:0] fin_q    [NUM_PE];     // columns finished by each PE
  logic [CW-1:0] total_q;
  logic [31:0]   cyc_q;

  initial assert (NUM_PE > 0 && (NUM_PE & (NUM_PE - 1)) == 0)
    else $error("pe_controller: NUM_PE must be a power of two");

  always_comb begin
    for (int p = 0; p < NUM_PE; p++) begin
      int owner, slot;
      owner = int'(qry_col[p]) % NUM_PE;
      slot  = int'(qry_col[p]) / NUM_PE;
      qry_ready[p] = int'(fin_q[owner]) > slot;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      run  <= 1'b0;
      cycles  <= '0;
      cyc_q   <= '0;
      total_q <= '0;
      for (int p = 0; p < NUM_PE; p++) begin
        issued_q[p]     <= '0;
        fin_q[p]        <= '0;
        assign_valid[p] <= 1'b0;
        assign_col[p]   <= '0;
      end
    end else begin
      done <= 1'b0;
      for (int p = 0; p < NUM_PE; p++) assign_valid[p] <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy    <= 1'b1;
          run     <= 1'b1;
          cyc_q   <= '0;
          total_q <= '0;
          for (int p = 0; p < NUM_PE; p++) begin
            issued_q[p] <= '0;
            fin_q[p]    <= '0;
          end
        end
      end else begin
        logic [CW-1:0] tot;
        cyc_q <= cyc_q + 32'd1;
        tot = total_q;
        for (int p = 0; p < NUM_PE; p++) begin
          int next_col;
          next_col = int'(issued_q[p]) * NUM_PE + p;
          if (pe_req[p] && !assign_valid[p] && next_col < int'(n_cols)) begin
            assign_valid[p] <= 1'b1;
            assign_col[p]   <= row_t'(next_col);
            issued_q[p]     <= issued_q[p] + 1'b1;
          end
          if (col_done[p]) begin
            fin_q[p] <= fin_q[p] + 1'b1;
            tot = tot + 1'b1;
          end
        end
        total_q <= tot;
        if (tot == n_cols) begin
          busy   <= 1'b0;
          done   <= 1'b1;
          cycles <= cyc_q + 32'd1;
        end
      end
    end
  end

endmodule
