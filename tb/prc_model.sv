// prc_model: behavioural stand-in for the vendor partial reconfiguration
// controller (PRC). Not synthesizable.
//
// On a pulse of hw_trigger[i] it raises decouple, fetches RM i's bitfile
// (BS_WORDS[i] words starting at BS_ADDR[i]) from the configuration memory
// with 16-beat AXI4 INCR read bursts, one at a time, writes every word to
// the ICAP port (chip select and write strobe low, one word per clock) and
// lowers decouple a few clocks after the last word. Triggers that come in
// during a reconfiguration wait in a queue. Outputs change at the falling
// clock edge. words_to_icap counts the words
// it has written.
module prc_model
  import recofuse_pkg::*;
#(
  parameter int N_RM = 4,
  parameter logic [N_RM-1:0][31:0] BS_ADDR = {32'h1030_0000, 32'h1020_0000,
                                              32'h1010_0000, 32'h1000_0000}
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [N_RM-1:0] hw_trigger,
  output axi_ar_t         ar,
  output logic            arvalid,
  input  logic            arready,
  input  axi_r_t          r,
  input  logic            rvalid,
  output logic            rready,
  output icap_wr_t        icap,
  output logic            decouple,
  output int              words_to_icap,
  output int              reconfigs
);
  int bs_words[N_RM];
  int trig_q[$];

  initial begin
    ar = '0; arvalid = 1'b0; rready = 1'b0;
    icap = '{csib: 1'b1, rdwrb: 1'b1, data: 32'h0};
    decouple = 1'b0;
    words_to_icap = 0;
    reconfigs = 0;
  end

  always @(posedge clk)
    if (!rst)
      for (int i = 0; i < N_RM; i++) if (hw_trigger[i]) trig_q.push_back(i);

  // outputs change at the falling clock edge, inputs are sampled at the
  // rising edge
  initial begin
    forever begin
      @(negedge clk);
      if (!rst && trig_q.size() != 0) begin
        int id, n, k;
        logic [31:0] buf_w[$];
        buf_w.delete();
        id = trig_q.pop_front();
        n  = bs_words[id];
        decouple = 1'b1;
        // fetch
        k = 0;
        while (k < n) begin
          int len;
          len = (n - k >= 16) ? 16 : n - k;
          ar = '{addr: BS_ADDR[id] + 32'(4 * k), len: 8'(len - 1), size: 3'd2, burst: 2'b01};
          arvalid = 1'b1;
          @(posedge clk);
          while (!arready) @(posedge clk);
          @(negedge clk);
          arvalid = 1'b0;
          rready  = 1'b1;
          for (int j = 0; j < len; j++) begin
            @(posedge clk);
            while (!rvalid) @(posedge clk);
            buf_w.push_back(r.data);
          end
          @(negedge clk);
          rready = 1'b0;
          k += len;
        end
        // write to ICAP
        foreach (buf_w[j]) begin
          icap = '{csib: 1'b0, rdwrb: 1'b0, data: buf_w[j]};
          @(negedge clk);
          words_to_icap++;
        end
        icap = '{csib: 1'b1, rdwrb: 1'b1, data: 32'h0};
        repeat (3) @(negedge clk);
        decouple = 1'b0;
        reconfigs++;
      end
    end
  end
endmodule
