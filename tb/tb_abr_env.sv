// tb_abr_env: closed-loop environment for the whole ABR service engine.
//
// Models an output port with ABR sources. Each source i transmits at its
// allowed cell rate ACR_i; every 32nd of its cells is a forward RM cell
// carrying CCR = ACR_i, sent on the egress port, and the destination turns it
// around as a backward RM cell (ER = peak rate) that is sent into the ingress
// port. When a backward RM cell leaves the engine, the source adopts its ER
// field as its new ACR (explicit-rate mode). The port queue is modelled once
// per cell time: it grows by (sum of ACR)/link - 1 cells and never goes
// below 0; its length drives queue_len. Other cells on the egress port are
// data cells. A burst of non-ABR traffic (40 % of the link for 1500 cell
// times) hits the queue once. Some RM cells carry a corrupted CRC, the receiver stalls at
// times, and one extra connection joins half way through the run.
//
// Checks: every egress cell leaves unchanged apart from EFCI; every ingress
// cell keeps a valid CRC (or its original bad one); a rewritten ER never
// exceeds the cell's ER; CI never appears without NI (its threshold is
// higher); at the end of each phase the ER, QC and link utilisation have
// settled near the max-min fair values (ER = link/N - MCR, QC = N).
// Counts each mechanism (RM accumulation, CRC drops, QC correction, EFCI
// marking, NI/CI marking, ER rewriting, end of start phase, back-
// pressure) and fails for one that never happened.
//
// FULL = 0 shortens T and W through the register bus (and retunes the
// coefficients for them); FULL = 1 leaves every register at its reset value.
module tb_abr_env #(
  parameter bit FULL = 0,
  parameter int PHASE_CELLS = 60000
);
  import abr_pkg::*;
  import tb_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        eg_rx_valid = 0, eg_rx_soc = 0, eg_rx_ready, eg_tx_ready = 1, eg_tx_valid, eg_tx_soc;
  logic [7:0]  eg_rx_data = 0, eg_tx_data;
  logic        in_rx_valid = 0, in_rx_soc = 0, in_rx_ready, in_tx_ready = 1, in_tx_valid, in_tx_soc;
  logic [7:0]  in_rx_data = 0, in_tx_data;
  logic [15:0] queue_len = 0, total_conn = 0;
  logic        bus_we = 0;
  logic [4:0]  bus_addr = 0;
  logic [31:0] bus_wdata = 0, bus_rdata;
  fp32_t       er, qc, ql_ave;
  rate_t       er_rate;
  logic        er_done, qc_done;
  abr_events_t ev;

  abr_engine dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam int  NMAX   = 8;
  localparam real LINK   = 353207.0;
  localparam int  TOTAL_CELLS = 2 * PHASE_CELLS;
  localparam real MCR    = LINK / 100.0;     // minimum cell rate of every source

  real acr [NMAX];
  real fcred [NMAX], bcred [NMAX];
  int  nsrc = 4;
  real q = 0.0;
  real burst = 0.0;   // non-ABR load, as a fraction of the link
  int  cell_no = 0;
  bit  done_all = 0;

  // mechanism counters
  int n_acc = 0, n_drop = 0, n_corr = 0, n_efci = 0, n_er_wr = 0, n_brm_bad = 0;
  int n_ni = 0, n_ci = 0, n_backpressure = 0, n_phase_end = 0, n_er_calc = 0, n_qc_calc = 0;

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk); bus_we = 1; bus_addr = 5'(a); bus_wdata = d;
    @(negedge clk); bus_we = 0;
  endtask

  // watchdog
  initial begin
    repeat (TOTAL_CELLS * 53 * 2 + 200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // queue model, one step per cell time
  initial begin
    @(posedge rst_n);
    forever begin
      real tot;
      repeat (53) @(posedge clk);
      tot = 0.0;
      for (int i = 0; i < nsrc; i++) tot += acr[i];
      q = q + tot / LINK + burst - 1.0;
      if (q < 0.0) q = 0.0;
      if (q > 60000.0) q = 60000.0;
      queue_len <= 16'($rtoi(q));
    end
  end

  // egress traffic: forward RM cells at ACR/32 per source, data cells otherwise
  cellp_t eg_sent [$];
  logic  eg_data_q [$];
  initial begin
    int seed, rr;
    seed = 1; rr = 0;
    @(posedge rst_n);
    repeat (20) @(posedge clk);
    while (!done_all) begin
      cell_t c;
      int    src;
      bit    bad;
      src = -1;
      rr = (rr + 1) % nsrc;                  // round-robin among sources with credit
      for (int j = 0; j < nsrc; j++) begin
        int i;
        i = (rr + j) % nsrc;
        fcred[i] += acr[i] / (32.0 * LINK);
        if (src < 0 && fcred[i] >= 1.0) begin src = i; fcred[i] -= 1.0; end
      end
      bad = ($urandom_range(0, 49) == 0);
      if (src >= 0)
        c = make_cell(3'b110, 8'h00, 16'h7FFF, r2rate(acr[src]), r2rate(MCR), bad, seed);
      else
        c = make_cell(3'b000, 8'h00, 16'h0, 16'h0, 16'h0, 1'b0, seed);
      c[2] = 8'(src < 0 ? 255 : src);
      seed++;
      eg_sent.push_back(pack_cell(c));
      eg_data_q.push_back(src < 0);
      for (int b = 0; b < 53; b++) begin
        @(negedge clk);
        eg_rx_valid = 1; eg_rx_soc = (b == 0); eg_rx_data = c[b];
        @(posedge clk);
        while (!eg_rx_ready) begin n_backpressure++; @(posedge clk); end
      end
      @(negedge clk); eg_rx_valid = 0;
      // new connections get a share of their own turn-around immediately
    end
  end

  // ingress traffic: backward RM cells, turned around at the same rate
  cellp_t in_sent [$];
  int    in_src [$];
  bit    in_bad [$];
  initial begin
    int seed, rr;
    seed = 50000; rr = 0;
    @(posedge rst_n);
    repeat (40) @(posedge clk);
    while (!done_all) begin
      cell_t c;
      int    src;
      bit    bad;
      src = -1;
      rr = (rr + 1) % nsrc;                  // round-robin among sources with credit
      for (int j = 0; j < nsrc; j++) begin
        int i;
        i = (rr + j) % nsrc;
        bcred[i] += acr[i] / (32.0 * LINK);
        if (src < 0 && bcred[i] >= 1.0) begin src = i; bcred[i] -= 1.0; end
      end
      bad = ($urandom_range(0, 49) == 0);
      if (src >= 0)
        c = make_cell(3'b110, 8'h80, 16'h7FFF, r2rate(acr[src]), r2rate(MCR), bad, seed);
      else
        c = make_cell(3'b000, 8'h00, 16'h0, 16'h0, 16'h0, 1'b0, seed);
      c[2] = 8'(src < 0 ? 255 : src);
      seed++;
      in_sent.push_back(pack_cell(c));
      in_src.push_back(src);
      in_bad.push_back(bad);
      for (int b = 0; b < 53; b++) begin
        @(negedge clk);
        in_rx_valid = 1; in_rx_soc = (b == 0); in_rx_data = c[b];
        @(posedge clk);
        while (!in_rx_ready) begin n_backpressure++; @(posedge clk); end
      end
      @(negedge clk); in_rx_valid = 0;
    end
  end

  // receivers stall now and then, in bursts long enough to fill the buffers
  initial begin
    forever begin
      @(negedge clk);
      if ($urandom_range(0, 20000) == 0) begin
        eg_tx_ready = 0; in_tx_ready = 0;
        repeat (150) @(negedge clk);
        eg_tx_ready = 1; in_tx_ready = 1;
      end
    end
  end

  // egress output checker
  initial begin
    cell_t got, sent;
    int b;
    b = 0;
    forever begin
      @(posedge clk);
      if (rst_n && eg_tx_valid && eg_tx_ready) begin
        got[b] = eg_tx_data;
        b++;
        if (b == 53) begin
          bit is_data;
          b = 0;
          sent = unpack_cell(eg_sent.pop_front());
          is_data = eg_data_q.pop_front();
          if (is_data && got[3][2] && !sent[3][2]) begin n_efci++; got[3][2] = 1'b0; end
          checks++;
          if (got != sent) begin
            failures++;
            if (failures < 4) for (int j = 0; j < 53; j++) if (got[j] != sent[j]) $display("FAIL egress cell %0d changed: byte %0d %h expected %h", checks, j, got[j], sent[j]);
          end
        end
      end
    end
  end

  // ingress output checker and source feedback
  initial begin
    cell_t got, sent;
    int b;
    b = 0;
    forever begin
      @(posedge clk);
      if (rst_n && in_tx_valid && in_tx_ready) begin
        got[b] = in_tx_data;
        b++;
        if (b == 53) begin
          int  src;
          bit  bad;
          b = 0;
          sent = unpack_cell(in_sent.pop_front());
          src  = in_src.pop_front();
          bad  = in_bad.pop_front();
          if (src >= 0) begin
            checks++;
            if (crc_good(got) == bad) begin failures++; $display("FAIL ingress RM cell CRC"); end
            if (!bad) begin
              checks++;
              if (rate2r({got[7], got[8]}) > rate2r({sent[7], sent[8]})) begin
                failures++; $display("FAIL ER raised");
              end
              if (got[6][4]) n_ni++;
              if (got[6][5]) n_ci++;
              // the CI threshold lies above the NI threshold, so CI implies NI
              checks++;
              if (got[6][5] && !got[6][4]) begin failures++; $display("FAIL CI without NI"); end
              if (src < nsrc) acr[src] = rate2r({got[7], got[8]});
              if (acr[src] < MCR) acr[src] = MCR;     // sources never go below MCR
            end else begin
              checks++;
              if (got != sent) begin failures++; $display("FAIL bad-CRC cell was changed"); end
            end
          end else begin
            checks++;
            if (got != sent) begin failures++; $display("FAIL ingress data cell changed"); end
          end
        end
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (ev.qci_accepted) n_acc++;
    if (ev.qci_dropped)  n_drop++;
    if (ev.qc_corrected) n_corr++;
    if (ev.er_written)   n_er_wr++;
    if (ev.brm_seen && ev.brm_crc_bad) n_brm_bad++;
    if (er_done) n_er_calc++;
    if (qc_done) n_qc_calc++;
  end
  logic sp_q = 1;
  always @(posedge clk) begin
    sp_q <= ev.start_phase;
    if (rst_n && sp_q && !ev.start_phase) n_phase_end++;
  end

  // check that ER, QC and utilisation settle near the fair share
  task automatic check_steady(input int n);
    real er_s, qc_s, util_s, er_min, er_max;
    int  k;
    er_s = 0.0; qc_s = 0.0; util_s = 0.0; k = 0;
    er_min = 1.0e30; er_max = 0.0;
    repeat (200) begin
      real tot;
      repeat (53 * (PHASE_CELLS / 1000)) @(posedge clk);
      tot = 0.0;
      for (int i = 0; i < n; i++) tot += acr[i];
      er_s += f2r(er); qc_s += f2r(qc); util_s += tot / LINK; k++;
      if (f2r(er) < er_min) er_min = f2r(er);
      if (f2r(er) > er_max) er_max = f2r(er);
    end
    er_s /= k; qc_s /= k; util_s /= k;
    $display("steady state with %0d sources: ER %.0f (fair %.0f, range %.0f..%.0f), QC %.2f, utilisation %.3f, queue %.0f",
             n, er_s, LINK / n - MCR, er_min, er_max, qc_s, util_s, q);
    checks++;
    if (abs_r(er_s - (LINK / n - MCR)) > 0.15 * LINK / n) begin failures++; $display("FAIL ER not near fair share"); end
    checks++;
    if (abs_r(qc_s - real'(n)) > 0.3 * n) begin failures++; $display("FAIL QC not near %0d", n); end
    checks++;
    if (util_s < 0.85 || util_s > 1.15) begin failures++; $display("FAIL utilisation %.3f", util_s); end
  endtask

  initial begin
    for (int i = 0; i < NMAX; i++) begin acr[i] = LINK / 50.0; fcred[i] = 0.0; bcred[i] = 0.0; end
    repeat (5) @(negedge clk);
    rst_n = 1;
    if (!FULL) begin
      wr(13, 32'd40);                         // T = 40 cells
      wr(14, 32'd400);                        // W = 400 cells
      wr(9, r2f(32.0 / (400.0 / LINK)));      // N_RM / W
    end
    total_conn = 16'(nsrc);
    // phase 1: four sources, with a burst of other traffic part way through
    repeat (53 * (PHASE_CELLS * 4 / 10)) @(posedge clk);
    burst = 0.4;
    repeat (53 * 1500) @(posedge clk);
    burst = 0.0;
    repeat (53 * (PHASE_CELLS * 4 / 10 - 1500)) @(posedge clk);
    check_steady(4);
    // phase 2: a fifth connection joins
    nsrc = 5;
    acr[4] = LINK / 50.0;
    total_conn = 16'(nsrc);
    repeat (53 * PHASE_CELLS - 200 * 53 * (PHASE_CELLS / 1000)) @(posedge clk);
    check_steady(5);
    done_all = 1;
    $display("mechanisms: QC_i accepted %0d, dropped %0d, QC corrected %0d, EFCI marked %0d, NI %0d, CI %0d, ER written %0d, bad-CRC backward RM %0d, back-pressure %0d, start phase ended %0d, ER computations %0d, QC computations %0d",
             n_acc, n_drop, n_corr, n_efci, n_ni, n_ci, n_er_wr, n_brm_bad, n_backpressure, n_phase_end, n_er_calc, n_qc_calc);
    checks++; if (n_acc == 0)          begin failures++; $display("FAIL no QC_i accumulation"); end
    checks++; if (n_drop == 0)         begin failures++; $display("FAIL no QC_i drop"); end
    checks++; if (n_corr < 2)          begin failures++; $display("FAIL QC correction missing"); end
    checks++; if (n_efci == 0)         begin failures++; $display("FAIL no EFCI marking"); end
    checks++; if (n_ni == 0)           begin failures++; $display("FAIL no NI marking"); end
    checks++; if (n_ci == 0)           begin failures++; $display("FAIL no CI marking"); end
    checks++; if (n_er_wr == 0)        begin failures++; $display("FAIL no ER rewrite"); end
    checks++; if (n_brm_bad == 0)      begin failures++; $display("FAIL no bad-CRC backward RM cell"); end
    checks++; if (n_backpressure == 0) begin failures++; $display("FAIL no back-pressure"); end
    checks++; if (n_phase_end != 1)    begin failures++; $display("FAIL start phase did not end once"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
