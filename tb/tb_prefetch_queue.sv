// tb_prefetch_queue: random operations on the prefetch queue (append,
// head insertion, flush, failed marks, residency changes) checked every
// cycle against a reference model kept as a SystemVerilog queue. Checks the
// ordered entries, the keep set, the push acknowledgement and the load
// request (first entry neither resident nor failed). Also checks the size
// rules: appends that overflow the 64-row capacity are refused, and a head
// insertion drops the tail until the queue fits.
module tb_prefetch_queue;
  localparam int M = 64, QD = 16, CAP = 64;
  logic clk = 0, rst_n = 0;
  logic [M-1:0][6:0] sizes;
  logic [M-1:0] resident;
  logic clear, push_valid, push_front, push_ok;
  logic [5:0] push_id;
  logic req_valid;
  logic [5:0] req_id;
  logic drop_valid;
  logic [5:0] drop_id;
  logic [M-1:0] keep;
  logic [4:0] count;
  logic [10:0] used_rows;
  logic [QD-1:0][5:0] entry_id;
  logic [QD-1:0] entry_valid;
  int checks = 0, failures = 0;
  int n_refused = 0, n_trimmed = 0;

  typedef struct { int id; bit failed; } ent_t;
  ent_t mq [$];

  prefetch_queue dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int mused();
    int u = 0;
    foreach (mq[i]) u += sizes[mq[i].id];
    return u;
  endfunction

  function automatic bit mpresent(int id);
    foreach (mq[i]) if (mq[i].id == id) return 1;
    return 0;
  endfunction

  initial begin
    bit exp_ok;
    clear = 0; push_valid = 0; push_front = 0; push_id = 0; drop_valid = 0; drop_id = 0;
    resident = '0;
    for (int i = 0; i < M; i++) sizes[i] = 7'(1 + ($urandom % 16));
    sizes[63] = 7'd65;  // larger than the chip: never accepted
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      clear      = ($urandom % 25) == 0;
      push_valid = ($urandom % 3) != 0;
      push_front = ($urandom % 4) == 0;
      push_id    = 6'(($urandom % 2) ? $urandom % 12 : $urandom % 64);
      drop_valid = ($urandom % 8) == 0 && mq.size() > 0;
      drop_id    = drop_valid ? 6'(mq[$urandom % mq.size()].id) : 6'd0;
      if ($urandom % 6 == 0) resident[$urandom % M] ^= 1'b1;
      #1;
      // model: drop, clear, push
      if (drop_valid) foreach (mq[i]) if (mq[i].id == drop_id) mq[i].failed = 1;
      if (clear) mq.delete();
      exp_ok = 0;
      if (push_valid) begin
        if (mpresent(push_id)) exp_ok = 1;
        else if (sizes[push_id] <= CAP) begin
          if (!push_front) begin
            if (mq.size() < QD && mused() + sizes[push_id] <= CAP) begin
              mq.push_back('{push_id, 0});
              exp_ok = 1;
            end else n_refused++;
          end else begin
            int cum;
            ent_t nq [$];
            exp_ok = 1;
            nq.delete();
            cum = sizes[push_id];
            nq.push_back('{push_id, 0});
            foreach (mq[i]) begin
              if (nq.size() < QD && cum + sizes[mq[i].id] <= CAP && nq.size() == i + 1) begin
                nq.push_back(mq[i]);
                cum += sizes[mq[i].id];
              end
            end
            if (nq.size() != mq.size() + 1) n_trimmed++;
            mq = nq;
          end
        end
      end
      checks++;
      if (push_valid && push_ok !== exp_ok) begin
        failures++;
        $display("FAIL push_ok id=%0d front=%0d got %0d want %0d", push_id, push_front, push_ok, exp_ok);
      end
      @(posedge clk); #1;
      clear = 0; push_valid = 0; drop_valid = 0;
      #1;
      // compare state
      begin
        logic [M-1:0] mkeep;
        bit mreq; int mreq_id;
        mkeep = '0; mreq = 0; mreq_id = 0;
        foreach (mq[i]) begin
          mkeep[mq[i].id] = 1'b1;
          if (!mreq && !mq[i].failed && !resident[mq[i].id]) begin mreq = 1; mreq_id = mq[i].id; end
        end
        checks++;
        if (keep !== mkeep || count != 5'(mq.size()) || used_rows != 11'(mused())) begin
          failures++;
          $display("FAIL state n=%0d count %0d want %0d", n, count, mq.size());
        end
        for (int i = 0; i < QD; i++) begin
          checks++;
          if (entry_valid[i] != (i < mq.size()) || (i < mq.size() && entry_id[i] != 6'(mq[i].id))) begin
            failures++;
            $display("FAIL entry %0d n=%0d got %0d/%0d want size %0d id %0d", i, n, entry_valid[i], entry_id[i], mq.size(), i < mq.size() ? mq[i].id : -1);
          end
        end
        checks++;
        if (req_valid != mreq || (mreq && req_id != 6'(mreq_id))) begin
          failures++;
          $display("FAIL req got %0d/%0d want %0d/%0d", req_valid, req_id, mreq, mreq_id);
        end
      end
    end
    checks++;
    if (n_refused == 0 || n_trimmed == 0) begin
      failures++;
      $display("FAIL size rules never exercised: refused=%0d trimmed=%0d", n_refused, n_trimmed);
    end
    $display("refused=%0d trimmed=%0d", n_refused, n_trimmed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
