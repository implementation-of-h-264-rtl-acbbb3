// tb_nal_unwrap: random NAL units (payloads rich in 00..03 bytes, the last
// byte non-zero as rbsp trailing bits guarantee) are wrapped into a byte
// stream with 3- or 4-byte start codes, emulation-prevention bytes and
// trailing zero padding. The unwrapped output must equal NEW_UNIT, payload,
// ..., END_OF_FILE exactly. The output side stalls at random.
module tb_nal_unwrap;
  import h264_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       in_valid, in_ready, in_eof;
  logic [7:0] in_data;
  logic       out_valid, out_ready;
  nal_item_t  out_item;

  nal_unwrap dut (.*);

  byte unsigned stream[$];
  nal_item_t    expect_q[$];
  int checks = 0, failures = 0, cycles = 0, removed = 0;

  initial begin : gen
    for (int u = 0; u < 40; u++) begin
      automatic int len = 1 + $urandom_range(0, 30);
      automatic byte unsigned p[$];
      automatic int z;
      for (int i = 0; i < len; i++) begin
        automatic int r = $urandom_range(0, 9);
        p.push_back(r < 5 ? 8'h00 : r < 8 ? byte'($urandom_range(1, 3)) : byte'($urandom_range(0, 255)));
      end
      if (p[len-1] == 0) p[len-1] = 8'h80;
      if ($urandom_range(0, 1)) stream.push_back(8'h00);
      stream.push_back(8'h00); stream.push_back(8'h00); stream.push_back(8'h01);
      expect_q.push_back('{tag: NAL_NEW_UNIT, data: 8'h00});
      z = 0;
      foreach (p[i]) begin
        if (z >= 2 && p[i] <= 3) begin stream.push_back(8'h03); z = 0; removed++; end
        stream.push_back(p[i]);
        z = (p[i] == 0) ? z + 1 : 0;
        expect_q.push_back('{tag: NAL_RBSP_BYTE, data: p[i]});
      end
      repeat ($urandom_range(0, 3)) stream.push_back(8'h00);
    end
    expect_q.push_back('{tag: NAL_END_OF_FILE, data: 8'h00});
  end

  int idx = 0;
  always_comb begin
    in_valid = rst_n;
    in_eof   = (idx >= stream.size());
    in_data  = in_eof ? 8'h00 : stream[idx];
  end

  always_ff @(posedge clk) begin
    cycles <= cycles + 1;
    out_ready <= ($urandom_range(0, 3) != 0);
    if (in_valid && in_ready && !in_eof) idx <= idx + 1;
    if (out_valid && out_ready) begin
      automatic nal_item_t e;
      checks++;
      if (expect_q.size() == 0) begin failures++; $display("extra output %p", out_item); end
      else begin
        e = expect_q.pop_front();
        if (out_item.tag != e.tag || (e.tag == NAL_RBSP_BYTE && out_item.data != e.data)) begin
          failures++;
          $display("mismatch: got %s %h expected %s %h", out_item.tag.name(), out_item.data, e.tag.name(), e.data);
        end
        if (e.tag == NAL_END_OF_FILE) begin
          $display("emulation bytes removed: %0d, cycles %0d", removed, cycles);
          if (removed == 0) failures++;
          checks++;
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end

  initial begin
    out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
