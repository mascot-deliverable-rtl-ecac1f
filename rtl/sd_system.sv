// Sphere decoder subsystem: two cores with FIFO scheduling.
//
// One core needs about 13 cycles per subcarrier on average, while 48
// subcarriers must be detected every 4 us (6.67 cycles each at 80 MHz), so two
// sphere cores share the work. Normalized received vectors y~ wait in an input
// FIFO; whenever a core is idle the control unit takes the next vector, reads
// that subcarrier's R~ and permutation from the preprocessing memory over the
// core's own read channel, and starts the core. Because the run time of the
// search varies, results arrive out of order; they are written into an output
// buffer at their subcarrier index and released from there strictly in
// subcarrier order, after Gray demapping. To bound the run time, the control
// unit aborts a search after MAX_CYCLES cycles; the core then returns the best
// leaf found so far. Two cores, the common control, FIFO scheduling, the
// subcarrier-ordered output buffer and aborting follow the document. The FIFO
// depth, the abort rule (a fixed cycle budget per vector) and the handshakes
// are this design's choices; the pseudo-soft output for aborted vectors is
// not built (hard decisions only).
//
// Interface: in_valid/in_ready push (sc, y~). Each read channel k presents
// rd_en/rd_addr and expects rd_r/rd_perm one cycle later. Results leave as a
// one-cycle out_valid pulse per subcarrier, in order 0..NSC-1, wrapping.
// Lint note: the cores' found flag, final metric and node count are not used
// here (only the symbols and the abort flag leave the subsystem); they stay on
// the core's interface for observation in simulation.
module sd_system
  import mimo_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = NSC,
  parameter int unsigned MAX_CYCLES = 32
) (
  input  logic           clk,
  input  logic           rst_n,
  input  modv_t          mods,
  input  logic           in_valid,
  output logic           in_ready,
  output logic [$clog2(FIFO_DEPTH):0] fifo_level,
  input  logic [SCW-1:0] in_sc,
  input  cvec_t          in_y,
  // two read channels into the R and config memories
  output logic [1:0]            rd_en,
  output logic [1:0][SCW-1:0]   rd_addr,
  input  cmat_t [1:0]           rd_r,
  input  pvec_t [1:0]           rd_perm,
  // in-order results
  output logic           out_valid,
  output logic [SCW-1:0] out_sc,
  output svec_t          out_sym,
  output vbits_t         out_bits,
  output logic [NT-1:0][2:0] out_nbits,
  output logic           out_aborted,
  // statistics
  output logic [15:0]    n_aborted,
  output logic [15:0]    n_core_used [2]
);

  localparam int unsigned AW = $clog2(FIFO_DEPTH);

  typedef struct packed {
    logic [SCW-1:0] sc;
    cvec_t          y;
  } fent_t;

  // ---- input FIFO ---------------------------------------------------------------
  fent_t            fifo [FIFO_DEPTH];
  logic [AW-1:0]    wp, rp;
  logic [AW:0]      cnt;
  logic             pop;
  fent_t            head;

  assign in_ready = (cnt != (AW+1)'(FIFO_DEPTH));
  assign head     = fifo[rp];
  assign fifo_level = cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
    end else begin
      if (in_valid && in_ready) wp <= (wp == AW'(FIFO_DEPTH - 1)) ? '0 : wp + 1'b1;
      if (pop)                  rp <= (rp == AW'(FIFO_DEPTH - 1)) ? '0 : rp + 1'b1;
      cnt <= cnt + (AW+1)'(in_valid && in_ready) - (AW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) fifo[wp] <= '{sc: in_sc, y: in_y};
  end

  // ---- control: dispatch to idle cores, abort long searches ---------------------
  typedef enum logic [1:0] {C_IDLE, C_FETCH, C_RUN} cst_e;
  cst_e             cst   [2];
  fent_t            job   [2];
  logic [15:0]      run_cyc [2];
  logic [1:0]       grant;
  logic [1:0]       core_ready, core_busy, core_start, core_abort;
  logic [1:0]       c_valid, c_found, c_aborted;
  logic [SCW-1:0]   c_sc  [2];
  svec_t            c_sym [2];
  logic [MW-1:0]    c_met [2];
  logic [15:0]      c_nodes [2];

  always_comb begin
    grant = '0;
    if (cnt != '0) begin
      if (cst[0] == C_IDLE)      grant[0] = 1'b1;
      else if (cst[1] == C_IDLE) grant[1] = 1'b1;
    end
  end
  assign pop = |grant;

  for (genvar k = 0; k < 2; k++) begin : g_core
    assign rd_en[k]      = grant[k];
    assign rd_addr[k]    = head.sc;
    assign core_start[k] = (cst[k] == C_FETCH);
    assign core_abort[k] = (cst[k] == C_RUN) && core_busy[k] &&
                           (run_cyc[k] >= 16'(MAX_CYCLES - 1));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        cst[k]         <= C_IDLE;
        run_cyc[k]     <= '0;
        n_core_used[k] <= '0;
      end else begin
        case (cst[k])
          C_IDLE:  if (grant[k]) cst[k] <= C_FETCH;
          C_FETCH: if (core_ready[k]) begin
                     cst[k]         <= C_RUN;
                     run_cyc[k]     <= '0;
                     n_core_used[k] <= n_core_used[k] + 1'b1;
                   end
          default: begin
                     run_cyc[k] <= run_cyc[k] + 1'b1;
                     if (c_valid[k]) cst[k] <= C_IDLE;
                   end
        endcase
      end
    end

    always_ff @(posedge clk) begin
      if (grant[k]) job[k] <= head;
    end

    sphere_core u_core (
      .clk         (clk),
      .rst_n       (rst_n),
      .mods        (mods),
      .in_valid    (core_start[k]),
      .in_ready    (core_ready[k]),
      .in_sc       (job[k].sc),
      .in_y        (job[k].y),
      .in_r        (rd_r[k]),
      .in_perm     (rd_perm[k]),
      .abort_req   (core_abort[k]),
      .busy        (core_busy[k]),
      .out_valid   (c_valid[k]),
      .out_sc      (c_sc[k]),
      .out_sym     (c_sym[k]),
      .out_metric  (c_met[k]),
      .out_nodes   (c_nodes[k]),
      .out_found   (c_found[k]),
      .out_aborted (c_aborted[k])
    );
  end

  // ---- output buffer, released in subcarrier order -------------------------------
  typedef struct packed {
    svec_t sym;
    logic  aborted;
  } oent_t;

  oent_t            obuf [NSC];
  logic [NSC-1:0]   oval;
  logic [SCW-1:0]   rel;
  oent_t            rel_ent;
  vbits_t           bits_c;
  logic [NT-1:0][2:0] nbits_c;

  assign rel_ent = obuf[rel];

  always_ff @(posedge clk) begin
    for (int k = 0; k < 2; k++)
      if (c_valid[k]) obuf[c_sc[k]] <= '{sym: c_sym[k], aborted: c_aborted[k]};
  end

  symbol_demap u_demap (
    .s     (rel_ent.sym),
    .mods  (mods),
    .bits  (bits_c),
    .nbits (nbits_c)
  );

  // next state of the "entry valid" bits: released entry cleared, new
  // results from the cores set
  logic [NSC-1:0] oval_nx;
  always_comb begin
    oval_nx = oval;
    if (oval[rel]) oval_nx[rel] = 1'b0;
    for (int k = 0; k < 2; k++)
      if (c_valid[k]) oval_nx[c_sc[k]] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      oval      <= '0;
      rel       <= '0;
      out_valid <= 1'b0;
      n_aborted <= '0;
    end else begin
      oval      <= oval_nx;
      out_valid <= oval[rel];
      if (oval[rel]) rel <= (rel == SCW'(NSC - 1)) ? '0 : rel + 1'b1;
      n_aborted <= n_aborted + 16'(c_valid[0] && c_aborted[0]) + 16'(c_valid[1] && c_aborted[1]);
    end
  end

  always_ff @(posedge clk) begin
    if (oval[rel]) begin
      out_sc      <= rel;
      out_sym     <= rel_ent.sym;
      out_bits    <= bits_c;
      out_nbits   <= nbits_c;
      out_aborted <= rel_ent.aborted;
    end
  end

endmodule
