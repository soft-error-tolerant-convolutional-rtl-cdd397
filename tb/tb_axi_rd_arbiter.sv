// tb_axi_rd_arbiter: two masters issue random read bursts through the
// arbiter to a slave model that answers with data = address + 4 * beat, with
// random ready and valid stalls on every channel. Each master checks that it
// gets exactly its own bursts, in order, with the right data and RLAST. When
// both masters keep requesting, grants must alternate; in addition, every
// burst that ends while the other master waits must be followed by a grant
// to that master (checked per burst). A phase with only
// master 1 active checks that an idle master does not block the port.
module tb_axi_rd_arbiter;
  import ensemble_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic    rst_n;
  logic    m_arvalid [2], m_arready [2], m_rvalid [2], m_rready [2];
  axi_ar_t m_ar [2];
  axi_r_t  m_r [2];
  logic    s_arvalid, s_arready, s_rvalid, s_rready;
  axi_ar_t s_ar;
  axi_r_t  s_r;
  int checks = 0, failures = 0;

  axi_rd_arbiter dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- slave model ----------------
  axi_ar_t cur;
  int      beat;
  bit      busy_s;
  int      grants [$];   // master of each accepted burst (from the address)

  // per-burst round-robin check: a master already waiting when the port is
  // released (RLAST) must get the next burst
  int  last_owner = -1;
  bit  other_waits = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (s_arvalid && s_arready && !busy_s) begin
        if (other_waits) begin
          checks++;
          if (int'(s_ar.addr[28]) == last_owner) begin
            failures++;
            $display("FAIL round robin: master %0d granted again while the other waited", last_owner);
          end
        end
        last_owner <= int'(s_ar.addr[28]);
      end
      if (s_rvalid && s_rready && s_r.last)
        other_waits <= (last_owner >= 0) && m_arvalid[1 - last_owner];
      else if (s_arvalid && s_arready)
        other_waits <= 1'b0;
    end
  end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_s <= 0; beat <= 0; s_arready <= 0; s_rvalid <= 0; s_r <= '0;
    end else begin
      s_arready <= !busy_s && ($urandom_range(0, 2) != 0);
      if (s_arvalid && s_arready && !busy_s) begin
        cur <= s_ar; beat <= 0; busy_s <= 1; s_arready <= 0;
        grants.push_back(int'(s_ar.addr[28]));
      end
      if (busy_s) begin
        if (!s_rvalid || s_rready) begin
          if (s_rvalid && s_rready && s_r.last) begin
            busy_s <= 0; s_rvalid <= 0;
          end else if ($urandom_range(0, 3) != 0) begin
            int b;
            b = (s_rvalid && s_rready) ? beat + 1 : beat;
            beat     <= b;
            s_rvalid <= 1;
            s_r.id   <= cur.id;
            s_r.data <= cur.addr + 32'(4 * b);
            s_r.resp <= 2'b00;
            s_r.last <= (b == int'(cur.len));
          end else begin
            if (s_rvalid && s_rready) beat <= beat + 1;
            s_rvalid <= 0;
          end
        end
      end
    end
  end

  // ---------------- masters ----------------
  int  todo [2];
  int  done_bursts [2];
  bit  active [2];

  for (genvar m = 0; m < 2; m++) begin : g_m
    axi_ar_t q [$];
    int      rbeat;
    always @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        m_arvalid[m] <= 0; m_ar[m] <= '0; m_rready[m] <= 0; rbeat <= 0;
      end else begin
        m_rready[m] <= ($urandom_range(0, 3) != 0);
        if (m_arvalid[m] && m_arready[m]) begin
          q.push_back(m_ar[m]);
          m_arvalid[m] <= 0;
        end else if (!m_arvalid[m] && active[m] && todo[m] > 0) begin
          axi_ar_t a;
          a.id    = AXI_ID_W'(m);
          a.addr  = {3'b000, 1'(m), 8'h00, 12'($urandom_range(0, 4095)), 8'h00};
          a.len   = 8'($urandom_range(0, 7));
          a.size  = 3'd2;
          a.burst = 2'b01;
          m_ar[m] <= a; m_arvalid[m] <= 1;
          todo[m] <= todo[m] - 1;
        end
        if (m_rvalid[m] && m_rready[m]) begin
          checks++;
          if (q.size() == 0) begin
            failures++; $display("FAIL master %0d: data without a request", m);
          end else begin
            axi_ar_t h;
            h = q[0];
            if (m_r[m].data !== h.addr + 32'(4 * rbeat) || m_r[m].id !== h.id ||
                m_r[m].last !== (rbeat == int'(h.len))) begin
              failures++;
              $display("FAIL master %0d beat %0d: data %h id %0d last %b", m, rbeat,
                       m_r[m].data, m_r[m].id, m_r[m].last);
            end
            if (m_r[m].last) begin
              void'(q.pop_front()); rbeat <= 0; done_bursts[m] <= done_bursts[m] + 1;
            end else rbeat <= rbeat + 1;
          end
        end
      end
    end
  end

  initial begin
    int alternations, pairs;
    rst_n = 0;
    todo = '{0, 0}; done_bursts = '{0, 0}; active = '{0, 0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    // both masters busy
    todo = '{200, 200}; active = '{1, 1};
    wait (done_bursts[0] == 200 && done_bursts[1] == 200);
    alternations = 0; pairs = 0;
    for (int i = 1; i < grants.size(); i++) begin
      pairs++;
      if (grants[i] != grants[i - 1]) alternations++;
    end
    checks++;
    if (alternations < pairs - 2) begin
      failures++; $display("FAIL round robin: %0d of %0d grants alternate", alternations, pairs);
    end
    // only master 1
    grants.delete();
    todo = '{0, 50}; active = '{0, 1};
    wait (done_bursts[1] == 250);
    checks++;
    if (grants.size() != 50) begin failures++; $display("FAIL lone master: %0d grants", grants.size()); end
    repeat (5) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
