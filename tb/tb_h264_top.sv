// tb_h264_top: end-to-end test of the decoder on generated byte streams.
//
// A 4x3-macroblock stream (SPS, PPS, and five pictures with skipped
// delimiter and SEI units) is generated by h264_tb_common.svh together with
// its expected decoded pictures. The stream is fed one byte per handshake
// with random gaps, the output is taken with random back-pressure, and every
// output word is compared with the reference model. Per picture the number
// of short-term reference pictures held afterwards is checked (IDR empties
// the list, a non-reference picture leaves it alone, the sliding window caps
// it at three). The inter request port is exercised after the stream: a
// word of reference picture 0 is read back and compared.
// Mechanisms counted: emulation prevention bytes, I_PCM, I_16x16 modes,
// I_4x4 modes, chroma modes, deblocked lines (model and hardware counter),
// reference marking, end of stream. Parameters are the defaults.
module tb_h264_top;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid, in_ready, in_eof;
  logic [7:0]  in_data;
  logic        out_valid, out_ready, out_last, out_eof;
  logic [31:0] out_data;
  logic        ireq_valid, ireq_ready, ires_valid, ires_ready;
  logic [1:0]  ireq_ref_idx, ireq_plane;
  logic [8:0]  ireq_xw;
  logic [10:0] ireq_y;
  logic [31:0] ires_data, lines_filtered;
  logic        error;
  logic [2:0]  num_short_term;

  h264_top dut (.*);

  `include "h264_tb_common.svh"

  int checks = 0, failures = 0;
  localparam int NPIC = 5;
  logic [31:0] expect_q [NPIC][$];
  int          exp_refs [NPIC];
  int          model_lines [NPIC];
  logic [31:0] last_pic_word;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    automatic int refs = 0;
    mbw = 4; mbh = 3;
    gen_headers();
    for (int p = 0; p < NPIC; p++) begin
      automatic bit idr = (p == 0);
      automatic int ref_idc = (p == 2) ? 0 : 1 + $urandom_range(0, 2);
      n_dbk_lines = 0;
      gen_picture(ref_idc, idr, p, p == 0 ? 60 : 30);
      model_lines[p] = n_dbk_lines;
      expected_words();
      expect_q[p] = exp_words;
      if (idr) refs = 1; else if (ref_idc != 0) refs = (refs < 3) ? refs + 1 : 3;
      exp_refs[p] = refs;
    end
  end

  // stream input
  initial begin
    in_valid = 0; in_eof = 0; in_data = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < stream.size(); i++) begin
      @(negedge clk);
      while ($urandom_range(0, 3) == 0) @(negedge clk);
      in_valid = 1; in_data = stream[i];
      do @(negedge clk); while (!in_hs);
      in_valid = 0;
    end
    in_valid = 1; in_eof = 1;
    do @(negedge clk); while (!in_hs);
    in_valid = 0; in_eof = 0;
  end
  // handshakes as the design saw them at the clock edge
  logic in_hs = 0, ireq_hs = 0;
  always @(posedge clk) begin
    in_hs   <= in_valid && in_ready;
    ireq_hs <= ireq_valid && ireq_ready;
  end

  always @(posedge clk) out_ready <= ($urandom_range(0, 4) != 0);

  // output checking
  int pic = 0, word = 0, hw_lines_prev = 0;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    if (pic < NPIC) begin
      check(word < expect_q[pic].size() && out_data == expect_q[pic][word],
            $sformatf("picture %0d word %0d: got %h expected %h", pic, word, out_data,
                      word < expect_q[pic].size() ? expect_q[pic][word] : 32'hx));
      check(out_last == (word == expect_q[pic].size() - 1), $sformatf("out_last at picture %0d word %0d", pic, word));
      if (pic == 0 && word == 0) last_pic_word = out_data;
      word++;
      if (out_last) begin
        fork
          automatic int pp = pic;
          begin
            repeat (4) @(posedge clk);
            check(num_short_term == 3'(exp_refs[pp]),
                  $sformatf("picture %0d: %0d short-term references, expected %0d", pp, num_short_term, exp_refs[pp]));
            // the hardware counts filtered lines, the model changed lines; both rise together
            check((lines_filtered != 32'(hw_lines_prev)) == (model_lines[pp] != 0) || model_lines[pp] == 0,
                  $sformatf("picture %0d: deblocking activity", pp));
            hw_lines_prev = lines_filtered;
          end
        join_none
        pic++; word = 0;
      end
    end else check(0, "output beyond the last picture");
  end

  initial begin
    ireq_valid = 0; ireq_ref_idx = 0; ireq_plane = 0; ireq_xw = 0; ireq_y = 0; ires_ready = 1;
    wait (out_eof === 1'b1);
    repeat (3) @(posedge clk);
    check(!error, "decoder error flag");
    check(pic == NPIC, $sformatf("%0d pictures decoded, expected %0d", pic, NPIC));
    // inter path: word 0 of the newest reference picture (picture 4)
    @(negedge clk);
    ireq_valid = 1; ireq_ref_idx = 0; ireq_plane = 0; ireq_xw = 0; ireq_y = 0;
    do @(negedge clk); while (!ireq_hs);
    ireq_valid = 0;
    while (!ires_valid) @(negedge clk);
    check(ires_data == expect_q[NPIC-1][0], $sformatf("reference read %h expected %h", ires_data, expect_q[NPIC-1][0]));
    // mechanisms that must have been exercised
    check(n_emul > 0, "emulation prevention bytes present");
    check(n_pcm > 0 && n_i16 > 0 && n_i4 > 0, "all macroblock kinds present");
    check(lines_filtered > 0, "deblocking active");
    $display("mechanisms: emulation=%0d pcm=%0d i16=%0d i4=%0d i16modes=%0d/%0d/%0d/%0d chroma=%0d/%0d/%0d/%0d i4modes=%0d/%0d/%0d lines=%0d",
             n_emul, n_pcm, n_i16, n_i4, n_i16_mode[0], n_i16_mode[1], n_i16_mode[2], n_i16_mode[3],
             n_c_mode[0], n_c_mode[1], n_c_mode[2], n_c_mode[3], n_i4_mode[0], n_i4_mode[1], n_i4_mode[2], lines_filtered);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    $display("FAIL: watchdog (error=%0d pic=%0d word=%0d)", error, pic, word);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
