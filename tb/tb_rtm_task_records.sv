// tb_rtm_task_records: drives the 64-record task database with random
// field writes (random byte enables) and ticks, and after every clock edge
// compares all records with a reference model. The model applies a tick
// only to delayed records: delay - ticks saturated at zero, delayed bit
// cleared at zero. Also checks that reset clears every record and that an
// operation is visible right after the clock edge that takes it.
module tb_rtm_task_records;
  import rtm_pkg::*;
  localparam int unsigned N = 64;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst_n, wr_en, wr_word, tick_en;
  logic [5:0]  wr_idx;
  logic [3:0]  wr_be;
  logic [31:0] wr_data;
  logic [15:0] tick_count;
  rtm_rec_t    recs [N];

  // reference model
  logic [3:0]  m_st [N];
  logic [7:0]  m_pr [N], m_ev [N];
  logic [15:0] m_dl [N];
  int checks = 0, failures = 0, n_released = 0;

  rtm_task_records #(.RECORDS(N)) dut (
    .clk(clk), .rst_n(rst_n), .wr_en(wr_en), .wr_idx(wr_idx), .wr_word(wr_word),
    .wr_be(wr_be), .wr_data(wr_data), .tick_en(tick_en), .tick_count(tick_count), .recs(recs));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare_all();
    for (int i = 0; i < N; i++) begin
      checks++;
      if (recs[i].status !== m_st[i] || recs[i].prio !== m_pr[i] ||
          recs[i].event_id !== m_ev[i] || recs[i].delay !== m_dl[i]) begin
        failures++;
        $display("FAIL rec %0d: %b/%0d/%0d/%0d exp %b/%0d/%0d/%0d", i,
                 recs[i].status, recs[i].prio, recs[i].event_id, recs[i].delay,
                 m_st[i], m_pr[i], m_ev[i], m_dl[i]);
      end
    end
  endtask

  initial begin
    rst_n = 0; wr_en = 0; tick_en = 0; wr_word = 0; wr_idx = 0; wr_be = 0; wr_data = 0; tick_count = 0;
    for (int i = 0; i < N; i++) begin m_st[i] = 0; m_pr[i] = 0; m_ev[i] = 0; m_dl[i] = 0; end
    @(posedge clk); #1;
    rst_n = 1;
    compare_all();
    for (int k = 0; k < 2500; k++) begin
      if ($urandom % 4 != 0) begin
        wr_en = 1; tick_en = 0;
        wr_idx = 6'($urandom); wr_word = 1'($urandom); wr_be = 4'($urandom); wr_data = $urandom;
        // bias status writes towards delayed tasks with short delays
        if (!wr_word && wr_be[0]) wr_data[1] = ($urandom % 4 != 0);
        if (wr_word) wr_data[15:8] = ($urandom % 2) ? 8'h00 : wr_data[15:8];
        if (!wr_word) begin
          if (wr_be[0]) m_st[wr_idx] = wr_data[3:0];
          if (wr_be[1]) m_pr[wr_idx] = wr_data[15:8];
          if (wr_be[2]) m_ev[wr_idx] = wr_data[23:16];
        end else begin
          if (wr_be[0]) m_dl[wr_idx][7:0]  = wr_data[7:0];
          if (wr_be[1]) m_dl[wr_idx][15:8] = wr_data[15:8];
        end
      end else begin
        wr_en = 0; tick_en = 1;
        tick_count = ($urandom % 2) ? 16'($urandom % 64) : 16'($urandom);
        for (int i = 0; i < N; i++) begin
          if (m_st[i][1]) begin
            if (m_dl[i] <= tick_count) begin
              m_dl[i] = 0; m_st[i][1] = 1'b0; n_released++;
            end else m_dl[i] = m_dl[i] - tick_count;
          end
        end
      end
      @(posedge clk); #1;
      wr_en = 0; tick_en = 0;
      compare_all();
    end
    // reset clears everything
    rst_n = 0;
    for (int i = 0; i < N; i++) begin m_st[i] = 0; m_pr[i] = 0; m_ev[i] = 0; m_dl[i] = 0; end
    @(posedge clk); #1;
    rst_n = 1;
    compare_all();
    checks++;
    if (n_released == 0) begin failures++; $display("FAIL no delay ever expired"); end
    $display("released %0d delayed tasks", n_released);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
