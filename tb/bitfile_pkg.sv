// bitfile_pkg: synthetic 7-series partial bitfiles for the testbenches.
//
// make_bitfile builds the word sequence of a small partial bitfile: dummy
// and bus-width words, the sync word, RCRC and IDCODE writes, a write of
// the frame address register (FAR), the frame data as a type-2 FDRI packet
// and, at the end, a DESYNC command. The frame data is random, and when
// `tricky` is set it deliberately holds the sync word and a CMD/DESYNC pair
// so that a parser that does not skip payloads by count is caught. The
// indices of the sync word, the FAR value and the DESYNC value are returned.
package bitfile_pkg;
  import recofuse_pkg::*;

  typedef struct {
    logic [31:0] w[$];
    int          sync_idx;
    int          far_idx;
    int          desync_idx;
  } bitfile_t;

  function automatic bitfile_t make_bitfile(input logic [31:0] far,
                                            input int n_frame_words,
                                            input bit tricky);
    bitfile_t b;
    for (int i = 0; i < 8; i++) b.w.push_back(32'hFFFF_FFFF);
    b.w.push_back(32'h0000_00BB);
    b.w.push_back(32'h1122_0044);
    b.w.push_back(32'hFFFF_FFFF);
    b.w.push_back(32'hFFFF_FFFF);
    b.sync_idx = b.w.size();
    b.w.push_back(SYNC_WORD);
    b.w.push_back(32'h2000_0000);                              // NOOP
    b.w.push_back(HDR_WRITE_CMD); b.w.push_back(32'h0000_0007); // RCRC
    b.w.push_back(32'h2000_0000);
    b.w.push_back(32'h2000_0000);
    b.w.push_back(32'h3001_8001); b.w.push_back(32'h0372_7093); // IDCODE
    b.w.push_back(HDR_WRITE_CMD); b.w.push_back(32'h0000_0001); // WCFG
    b.w.push_back(32'h2000_0000);
    b.w.push_back(HDR_WRITE_FAR);
    b.far_idx = b.w.size();
    b.w.push_back(far);
    b.w.push_back(32'h2000_0000);
    b.w.push_back(32'h3000_4000);                              // FDRI, 0 words
    b.w.push_back(32'h5000_0000 | 32'(n_frame_words));         // type 2
    for (int i = 0; i < n_frame_words; i++) begin
      logic [31:0] d;
      d = $urandom;
      if (tricky) begin
        case (i % 7)
          1: d = SYNC_WORD;
          3: d = HDR_WRITE_CMD;
          4: d = CMD_DESYNC;
          5: d = HDR_WRITE_FAR;
          default: ;
        endcase
      end
      b.w.push_back(d);
    end
    b.w.push_back(HDR_WRITE_CMD); b.w.push_back(32'h0000_0005); // START
    b.w.push_back(HDR_WRITE_CMD);
    b.desync_idx = b.w.size();
    b.w.push_back(CMD_DESYNC);
    for (int i = 0; i < 4; i++) b.w.push_back(32'h2000_0000);
    return b;
  endfunction
endpackage
