// tb_hack_cache: random fills, updates and lookups on the 16-line 2-way cache
// compared with a model that keeps, per set, a FIFO queue of the addresses in
// fill order: a fill of a new address into a full set evicts the front of
// the queue; an update changes only data already present.
module tb_hack_cache;
  import hack_pkg::*;
  localparam int LINES = 16, WAYS = 2, SETS = LINES / WAYS;
  logic clk = 0, rst = 1, fill_en = 0, upd_en = 0, hit;
  addr_t addr = 0, fill_addr = 0, upd_addr = 0;
  word_t rdata, fill_data = 0, upd_data = 0;
  int checks = 0, failures = 0, hits = 0, evictions = 0;

  addr_t q [SETS][$];
  word_t val [addr_t];

  hack_cache dut (.clk, .rst, .addr, .hit, .rdata, .fill_en, .fill_addr, .fill_data,
                  .upd_en, .upd_addr, .upd_data);
  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit present(addr_t a);
    foreach (q[int'(a) % SETS][i]) if (q[int'(a) % SETS][i] == a) return 1;
    return 0;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 5000; n++) begin
      fill_en = ($urandom_range(2) == 0);
      fill_addr = addr_t'($urandom_range(47));
      fill_data = 16'($urandom);
      upd_en = ($urandom_range(3) == 0);
      upd_addr = addr_t'($urandom_range(47));
      upd_data = 16'($urandom);
      if (upd_en && fill_en && upd_addr == fill_addr) upd_en = 0;
      addr = addr_t'($urandom_range(47));
      #1;
      checks++;
      if (hit !== present(addr) || (hit && rdata !== val[addr])) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d hit=%0d model=%0d", addr, hit, present(addr));
      end
      if (hit) hits++;
      @(posedge clk);
      if (upd_en && present(upd_addr)) val[upd_addr] = upd_data;
      if (fill_en) begin
        if (!present(fill_addr)) begin
          if (q[int'(fill_addr) % SETS].size() == WAYS) begin
            void'(q[int'(fill_addr) % SETS].pop_front());
            evictions++;
          end
          q[int'(fill_addr) % SETS].push_back(fill_addr);
        end
        val[fill_addr] = fill_data;
      end
      @(negedge clk);
    end
    checks++;
    if (hits == 0 || evictions == 0) failures++;
    $display("hits=%0d evictions=%0d", hits, evictions);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
