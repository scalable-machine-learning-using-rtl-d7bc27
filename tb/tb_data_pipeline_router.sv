// tb_data_pipeline_router: drives host packets into the router byte by byte
// (as the SPI client would deliver them) with eight stand-in Model Managers
// and a simulated memory behind the router's memory handle. Checks:
//   - models are stored back to back from address 0 and assigned to the
//     lowest free Model Manager with the right region and pipeline id;
//   - a sample is stored at the block RAM buffer before TRAIN is sent, TRAIN
//     reaches exactly the Model Managers of that pipeline, and a second
//     sample waits until they have stopped training;
//   - GET_METRIC / GET_MODEL return the marker byte and the exported words
//     most significant byte first;
//   - a ninth model sets the error bit and is dropped; words arriving with
//     the queue full set the overflow bit;
//   - the status byte shows busy and training.
// Timing: one byte per 2 to 8 clocks on rx; stand-in Model Managers train
// for 100 to 300 clocks; reply bytes are taken at random cycles. Packet
// format is this design's own (the source gives only the router's role).
module tb_data_pipeline_router;
  import ml_pkg::*;
  localparam int NM = 8;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  logic rx_valid, tx_valid, tx_ready;
  logic [7:0] rx_byte, tx_byte, status;
  logic [NM-1:0] mm_cmd_valid, mm_cmd_ready, ex_valid, ex_last, ex_ready;
  mm_cmd_e mm_cmd_op;
  addr_t mm_cmd_begin, mm_cmd_end;
  logic [7:0] mm_cmd_dp;
  mm_phase_e mm_phase [NM];
  logic [7:0] mm_dp [NM];
  word_t ex_data [NM];
  mh_req_t h_req [1];
  mh_rsp_t h_rsp [1];
  logic model_evt, sample_evt;

  data_pipeline_router dut (
    .clk, .rst_n, .rx_valid, .rx_byte, .tx_valid, .tx_byte, .tx_ready, .status,
    .mm_cmd_valid, .mm_cmd_op, .mm_cmd_begin, .mm_cmd_end, .mm_cmd_dp,
    .mm_cmd_ready, .mm_phase, .mm_dp, .ex_valid, .ex_data, .ex_last, .ex_ready,
    .h_req(h_req[0]), .h_rsp(h_rsp[0]), .model_evt, .sample_evt);
  tb_handle_mem #(.NH(1)) u_mem (.clk, .req(h_req), .rsp(h_rsp));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ------------------------------------------------ stand-in Model Managers
  addr_t m_beg [NM], m_end [NM];
  int    n_train [NM], n_assign [NM], train_left [NM];
  word_t exp_sample [$];
  word_t metric [NM];
  int    ex_pos [NM], ex_len [NM];
  bit    seen_busy = 0, seen_training = 0;

  always_comb
    for (int i = 0; i < NM; i++)
      mm_cmd_ready[i] = mm_phase[i] == MM_ASSIGNED || mm_phase[i] == MM_UNASSIGNED;

  always_comb
    for (int i = 0; i < NM; i++) begin
      ex_valid[i] = (mm_phase[i] == MM_EXPORT_METRIC || mm_phase[i] == MM_EXPORT_MODEL)
                    && ex_pos[i] < ex_len[i];
      ex_last[i]  = ex_pos[i] == ex_len[i] - 1;
      ex_data[i]  = (mm_phase[i] == MM_EXPORT_METRIC) ? metric[i]
                  : (u_mem.mem.exists(int'(m_beg[i]) + ex_pos[i]) ?
                     u_mem.mem[int'(m_beg[i]) + ex_pos[i]] : 32'hDEAD_BEEF);
    end

  initial
    for (int i = 0; i < NM; i++) begin
      mm_phase[i] = MM_UNASSIGNED; mm_dp[i] = 0; n_train[i] = 0; n_assign[i] = 0;
      metric[i] = $urandom; ex_pos[i] = 0; ex_len[i] = 0; train_left[i] = 0;
    end

  always @(posedge clk) begin
    if (status[0]) seen_busy = 1;
    if (status[1]) seen_training = 1;
    for (int i = 0; i < NM; i++) begin
      if (mm_phase[i] == MM_FORWARD) begin
        if (train_left[i] == 0) mm_phase[i] <= MM_ASSIGNED;
        else train_left[i]--;
      end
      if ((mm_phase[i] == MM_EXPORT_METRIC || mm_phase[i] == MM_EXPORT_MODEL)) begin
        if (ex_valid[i] && ex_ready[i]) ex_pos[i] <= ex_pos[i] + 1;
        else if (ex_pos[i] >= ex_len[i]) mm_phase[i] <= MM_ASSIGNED;
      end
      if (mm_cmd_valid[i] && mm_cmd_ready[i]) begin
        case (mm_cmd_op)
          MMC_ASSIGN: begin
            m_beg[i] = mm_cmd_begin; m_end[i] = mm_cmd_end; mm_dp[i] <= mm_cmd_dp;
            n_assign[i]++; mm_phase[i] <= MM_ASSIGNED;
          end
          MMC_TRAIN: begin
            n_train[i]++;
            check(mm_cmd_begin == 24'h800000 && int'(mm_cmd_end - mm_cmd_begin) == exp_sample.size(),
                  $sformatf("train region mm%0d %h..%h", i, mm_cmd_begin, mm_cmd_end));
            for (int k = 0; k < exp_sample.size(); k++)
              check(u_mem.mem.exists(int'(mm_cmd_begin) + k) &&
                    u_mem.mem[int'(mm_cmd_begin) + k] == exp_sample[k],
                    $sformatf("sample word %0d at TRAIN of mm%0d", k, i));
            train_left[i] = 100 + $urandom_range(200);
            mm_phase[i] <= MM_FORWARD;
          end
          MMC_METRIC: begin ex_pos[i] <= 0; ex_len[i] <= 1; mm_phase[i] <= MM_EXPORT_METRIC; end
          MMC_MODEL: begin
            ex_pos[i] <= 0; ex_len[i] <= int'(m_end[i] - m_beg[i]); mm_phase[i] <= MM_EXPORT_MODEL;
          end
        endcase
      end
    end
  end

  // ------------------------------------------------------- host side
  byte unsigned txq [$];
  always @(posedge clk) begin
    tx_ready <= 1'b0;
    if (tx_valid && !tx_ready && $urandom_range(7) == 0) begin
      tx_ready <= 1'b1; txq.push_back(tx_byte);
    end
  end

  task automatic send_byte(byte unsigned b, int gap = 6);
    @(negedge clk); rx_valid = 1; rx_byte = b;
    @(negedge clk); rx_valid = 0;
    repeat ($urandom_range(gap)) @(negedge clk);
  endtask
  task automatic send_word(word_t w, int gap = 6);
    for (int s = 3; s >= 0; s--) send_byte(w[8*s +: 8], gap);
  endtask
  task automatic send_pkt(byte unsigned op, byte unsigned dp, word_t words [$], int gap = 6);
    send_byte(op); send_byte(dp); send_word(32'(words.size()));
    foreach (words[k]) send_word(words[k], gap);
  endtask
  task automatic wait_idle();
    int t;
    t = 0;
    do begin @(posedge clk); t++; end while ((dut.es != dut.E_IDLE || dut.rs != dut.R_OP) && t < 100000);
    repeat (3) @(posedge clk);
  endtask
  task automatic read_reply(int nwords, output word_t got [$]);
    int t;
    t = 0;
    got.delete();
    while (txq.size() < 1 + 4 * nwords && t < 200000) begin @(posedge clk); t++; end
    check(txq.size() == 1 + 4 * nwords, $sformatf("reply size %0d", txq.size()));
    if (txq.size() > 0) check(txq[0] == 8'hA5, "reply marker");
    for (int k = 0; k < nwords && 4 + 4 * k < txq.size(); k++)
      got.push_back({txq[1 + 4 * k], txq[2 + 4 * k], txq[3 + 4 * k], txq[4 + 4 * k]});
    txq.delete();
  endtask

  word_t models [NM + 1][$];
  int    mdp [NM + 1];
  initial begin
    word_t smp [$], got [$];
    int base;
    rx_valid = 0; rx_byte = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    send_byte(8'h00);                                  // no-op
    // 1. three models: pipelines 0, 0, 1
    base = 0;
    for (int m = 0; m < 3; m++) begin
      int n;
      n = 5 + $urandom_range(20);
      for (int k = 0; k < n; k++) models[m].push_back($urandom);
      mdp[m] = (m == 2) ? 1 : 0;
      send_pkt(PKT_ASN_MODEL, byte'(mdp[m]), models[m]);
      wait_idle();
      check(n_assign[m] == 1 && m_beg[m] == addr_t'(base) && m_end[m] == addr_t'(base + n)
            && mm_dp[m] == 8'(mdp[m]), $sformatf("assign model %0d", m));
      for (int k = 0; k < n; k++)
        check(u_mem.mem.exists(base + k) && u_mem.mem[base + k] == models[m][k],
              $sformatf("model %0d word %0d", m, k));
      base += n;
    end
    // 2. a sample for pipeline 0, then another straight after
    for (int s = 0; s < 2; s++) begin
      smp.delete();
      for (int k = 0; k < 7; k++) smp.push_back($urandom);
      if (s == 1) check(mm_phase[0] == MM_FORWARD, "second sample arrives while training");
      exp_sample = smp;
      send_pkt(PKT_SAMPLE, 8'd0, smp);
      wait_idle();
      check(n_train[0] == s + 1 && n_train[1] == s + 1 && n_train[2] == 0,
            $sformatf("train counts %0d %0d %0d", n_train[0], n_train[1], n_train[2]));
    end
    // 3. metric and model export
    send_byte(PKT_GET_METRIC); send_byte(8'd1);
    read_reply(1, got);
    check(got.size() == 1 && got[0] == metric[1], "metric word");
    wait_idle();
    send_byte(PKT_GET_MODEL); send_byte(8'd2);
    read_reply(models[2].size(), got);
    for (int k = 0; k < models[2].size(); k++)
      check(k < got.size() && got[k] == models[2][k], $sformatf("exported model word %0d", k));
    wait_idle();
    // 4. fill the remaining five Model Managers, then one too many
    check(status[3] == 1'b0, "no error yet");
    for (int m = 3; m <= NM; m++) begin
      models[m].push_back($urandom); models[m].push_back($urandom);
      send_pkt(PKT_ASN_MODEL, 8'd2, models[m]);
      wait_idle();
    end
    for (int m = 3; m < NM; m++) check(n_assign[m] == 1, $sformatf("assign mm%0d", m));
    check(status[3] == 1'b1, "error bit after a ninth model");
    check(seen_busy && seen_training, "busy and training status seen");
    // 5. a sample longer than the queue arrives while the pipeline trains
    smp.delete();
    for (int k = 0; k < 40; k++) smp.push_back($urandom);
    exp_sample = '{32'd1};
    send_pkt(PKT_SAMPLE, 8'd2, '{32'd1});             // start pipeline 2 training
    wait_idle();
    check(status[2] == 1'b0, "no overflow yet");
    send_byte(PKT_SAMPLE); send_byte(8'd2); send_word(32'd40, 0);
    foreach (smp[k]) send_word(smp[k], 0);
    check(status[2] == 1'b1, "overflow bit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
