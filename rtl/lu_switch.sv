// lu_switch: fully connected switch between the PEs, the distributed caches
// and the host driver port.
//
// Every PE can read every other PE's cache through it (its own cache it reads
// directly), and the driver port both writes the matrix into any cache and
// reads results back. Requesters 0..NUM_PE-1 are the PEs, requester NUM_PE is
// the driver. Each cache's external read port is a target with its own
// round-robin arbiter, so up to NUM_PE reads proceed in the same clock as long
// as they go to different caches; a requester that loses arbitration holds
// its request (stall) and is counted in wait_cycles.
// Handshake: a requester holds req_valid, req_tgt and req until req_ready;
// the read data returns on rsp with rsp_valid exactly one clock after the
// clock of req_ready. Driver writes take effect in the clock they are given
// and are never blocked. The arbitration scheme and handshake are this
// design's choices; the document names a fully connected switch and a driver
// interface on it.
module lu_switch
  import lu_pkg::*;
#(
  parameter int NUM_PE = 16,
  localparam int NR = NUM_PE + 1,
  localparam int TW = (NUM_PE > 1) ? $clog2(NUM_PE) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // read requesters
  input  logic          req_valid [NR],
  input  logic [TW-1:0] req_tgt   [NR],
  input  rd_req_t       req       [NR],
  output logic          req_ready [NR],
  output logic          rsp_valid [NR],
  output rd_rsp_t       rsp       [NR],
  // driver writes
  input  logic          drv_we,
  input  logic [TW-1:0] drv_tgt,
  input  wr_req_t       drv_wr,
  // cache side
  output logic          ext_re  [NUM_PE],
  output rd_req_t       ext_rd  [NUM_PE],
  input  rd_rsp_t       ext_rsp [NUM_PE],
  output logic          sw_we   [NUM_PE],
  output wr_req_t       sw_wr   [NUM_PE],
  // statistics
  output logic [31:0]   wait_cycles
);

  localparam int RW = $clog2(NR);

  logic [RW-1:0] rr_q    [NUM_PE];   // next requester to favour, per target
  logic [RW-1:0] gsrc    [NUM_PE];
  logic          gvalid  [NUM_PE];
  logic [TW-1:0] rtgt_q  [NR];
  logic          rpend_q [NR];

  always_comb begin
    for (int r = 0; r < NR; r++) req_ready[r] = 1'b0;
    for (int t = 0; t < NUM_PE; t++) begin
      gvalid[t] = 1'b0;
      gsrc[t]   = '0;
      for (int o = NR - 1; o >= 0; o--) begin
        int r;
        r = int'(rr_q[t]) + o;
        if (r >= NR) r = r - NR;
        if (req_valid[r] && int'(req_tgt[r]) == t) begin
          gvalid[t] = 1'b1;
          gsrc[t]   = RW'(r);
        end
      end
      ext_re[t] = gvalid[t];
      ext_rd[t] = req[gsrc[t]];
      if (gvalid[t]) req_ready[gsrc[t]] = 1'b1;
      sw_we[t] = drv_we && (int'(drv_tgt) == t);
      sw_wr[t] = drv_wr;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < NUM_PE; t++) rr_q[t] <= '0;
      for (int r = 0; r < NR; r++) begin
        rpend_q[r] <= 1'b0;
        rtgt_q[r]  <= '0;
      end
      wait_cycles <= '0;
    end else begin
      for (int t = 0; t < NUM_PE; t++)
        if (gvalid[t]) rr_q[t] <= (int'(gsrc[t]) == NR - 1) ? '0 : gsrc[t] + 1'b1;
      for (int r = 0; r < NR; r++) begin
        rpend_q[r] <= req_valid[r] && req_ready[r];
        if (req_valid[r] && req_ready[r]) rtgt_q[r] <= req_tgt[r];
        if (req_valid[r] && !req_ready[r]) wait_cycles <= wait_cycles + 32'd1;
      end
    end
  end

  always_comb begin
    for (int r = 0; r < NR; r++) begin
      rsp_valid[r] = rpend_q[r];
      rsp[r]       = ext_rsp[rtgt_q[r]];
    end
  end

endmodule
