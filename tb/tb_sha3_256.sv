// tb_sha3_256: self-checking test of the SHA-3 unit.
// Hashes messages whose byte i is (37*i + 11) mod 256, at lengths chosen to
// land on and around the 136-byte block boundary, plus "abc", and compares
// each digest with a SHA3-256 value computed beforehand by an independent
// implementation. It also checks the time one block takes: 24 rounds.
module tb_sha3_256;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic         start, in_valid, in_ready, in_last, digest_valid;
  logic [127:0] in_data;
  logic [4:0]   in_nbytes;
  logic [255:0] digest;
  int checks = 0, failures = 0;

  sha3_256 dut (.*);

  function automatic logic [7:0] mbyte(int i);
    return 8'((i * 37 + 11) & 255);
  endfunction

  task automatic hash_msg(input int len, input bit use_abc, output logic [255:0] d, output int cycles);
    int nw;
    nw = (len + 15) / 16;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    for (int w = 0; w < nw; w++) begin
      logic [127:0] word;
      bit r;
      word = '0;
      for (int b = 0; b < 16; b++)
        if (16*w + b < len) word[127 - 8*b -: 8] = use_abc ? 8'(8'h61 + b) : mbyte(16*w + b);
      in_data   = word;
      in_last   = (w == nw - 1);
      in_nbytes = (w == nw - 1) ? 5'(len - 16*(nw - 1)) : 5'd16;
      in_valid  = 1'b1;
      do begin
        r = in_ready;
        @(negedge clk);
      end while (!r);
      in_valid = 1'b0;
    end
    cycles = 0;
    while (!digest_valid) begin @(negedge clk); cycles++; end
    d = digest;
  endtask

  int lens [9] = '{1, 3, 16, 64, 135, 136, 137, 200, 300};
  logic [255:0] exp_d [9] = '{
    256'h962f8420917d7fa5479f4a767bf9b9a30a4ab377af26d72dbcff167d6ce3f6f5,
    256'h49e580eb827c41eef7a105c0d4accdc58663ad774662ec919ee23c99214d856b,
    256'h7f9f1bfaa90a8cc16ae23f5db587b65b794b09349a55614ca1a5882f3d7bb11b,
    256'he8e686424d5eb6ab8534b163dfa3a801c689583238b4443d92d4626a6b320cef,
    256'h3aa81a5b233ce753b2ab56b3c922338134eb11b8dc3d877d0bc8d19751684b76,
    256'h9f065722983c1b643b3fabbed6e791f6d74f77e6cf5a2d38c07c124465ed5d9f,
    256'h30efe517346c818828634cb8a3eb3538c14bc2f280132cf0261ed18a7dd85a8b,
    256'h298588fab178b5941df80b0c340c0bd1132713540627aaf3aac3b2fbf1f9fabc,
    256'h4a1aa69881e6303b4ea449b78735aa3f7909010ff1355b9d83dbe86b43e93666};

  initial begin
    logic [255:0] d;
    int cyc;
    start = 0; in_valid = 0; in_last = 0; in_data = '0; in_nbytes = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    hash_msg(3, 1'b1, d, cyc);
    checks++;
    if (d !== 256'h3a985da74fe225b2045c172d6bd390bd855f086e3e9d525b46bfe24511431532) begin
      failures++; $display("FAIL abc: %h", d);
    end
    // one short block: the permutation takes 24 clocks after the last word
    checks++;
    if (cyc != 24) begin failures++; $display("FAIL latency %0d", cyc); end
    for (int k = 0; k < 9; k++) begin
      hash_msg(lens[k], 1'b0, d, cyc);
      checks++;
      if (d !== exp_d[k]) begin failures++; $display("FAIL len %0d: %h", lens[k], d); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
