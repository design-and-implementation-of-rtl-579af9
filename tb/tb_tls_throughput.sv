// tb_tls_throughput: record throughput of CBC+CMAC and CBC+SHA encryption for
// plaintexts of 384 to 1536 bits in 128-bit steps, the range of the
// throughput evaluation this accelerator targets. For every length it
// encrypts a record, decrypts it again and checks the plaintext and the MAC
// verdict, then prints the throughput at 100 MHz measured from the command to
// `done` (set-up included). It checks that a longer CBC+CMAC record never
// lowers the throughput and that CBC+CMAC stays above 700 Mbit/s from 1024
// bits on. CBC+SHA dips where the padded record first needs a second SHA-3
// block (above 1080 bits), so only its correctness is checked.
module tb_tls_throughput;
  import tls_pkg::*;
  localparam int unsigned W = 256;
  localparam logic [127:0] IV = 128'h00112233445566778899aabbccddeeff;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic         en, rd_req, out_valid, busy, done, auth_ok, mac_ok;
  logic [5:0]   cmd;
  logic [127:0] data_in, data_out;
  int checks = 0, failures = 0;

  tls_accel #(.W(W)) dut (.*);

  logic [127:0] outq [$];
  always @(posedge clk) if (!rst && out_valid) outq.push_back(data_out);

  task automatic send_cmd(input logic [5:0] c);
    @(negedge clk);
    while (busy) @(negedge clk);
    cmd = c; en = 1;
    @(negedge clk);
    en = 0;
  endtask

  task automatic send_word(input logic [127:0] d);
    bit r;
    data_in = d; en = 1;
    do begin r = rd_req; @(negedge clk); end while (!r);
    en = 0;
  endtask

  function automatic logic [127:0] mword(int w, int seed);
    return {4{32'(w * 32'h9e3779b9 + seed)}};
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [127:0] ct [$];
    int t0, cyc, mbps, prev_mbps;
    en = 0; cmd = '0; data_in = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    send_cmd({2'b00, MODE_STORE_SECRET});
    send_word(128'h000102030405060708090a0b0c0d0e0f);
    send_word('0);
    while (busy) @(negedge clk);

    for (int md = 0; md < 2; md++) begin
      mode_e enc_md, dec_md;
      enc_md = md == 0 ? MODE_ENC_CMAC : MODE_ENC_SHA;
      dec_md = md == 0 ? MODE_DEC_CMAC : MODE_DEC_SHA;
      prev_mbps = 0;
      for (int bits = 384; bits <= 1536; bits += 128) begin
        int nb;
        nb = bits / 128;
        outq.delete();
        @(negedge clk);
        t0 = $time;
        send_cmd({2'b00, enc_md});
        send_word(128'(bits / 8));
        send_word(IV);
        for (int w = 0; w < nb; w++) send_word(mword(w, bits));
        while (busy) @(negedge clk);
        cyc  = ($time - t0) / 10;
        mbps = bits * 100 / cyc;
        $display("%s %0d bits: %0d cycles, %0d Mbps at 100 MHz", md == 0 ? "CBC_CMAC" : "CBC_SHA ",
                 bits, cyc, mbps);
        if (md == 0) check(mbps >= prev_mbps, "CBC_CMAC throughput does not drop with length");
        if (md == 0 && bits >= 1024) check(mbps >= 700, "CBC_CMAC above 700 Mbps");
        prev_mbps = mbps;
        @(negedge clk);
        ct = outq;
        check(ct.size() == nb + (md == 0 ? 1 : 2), "ciphertext length");
        outq.delete();
        send_cmd({2'b00, dec_md});
        send_word(128'(bits / 8));
        send_word(IV);
        foreach (ct[i]) send_word(ct[i]);
        while (busy) @(negedge clk);
        @(negedge clk);
        check(outq.size() == nb, "plaintext length");
        for (int w = 0; w < nb && w < outq.size(); w++) check(outq[w] == mword(w, bits), "plaintext");
        check(mac_ok, "MAC accepted");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
