// tb_vectors_pkg -- reference data for the FT CM testbenches.
//
// Message i is M(i) = 64'h0123456789ABCDEF ^ (i * 64'h1F2E3D4C5B6A7988) (mod 2^64), sent with
// counter value C = i. expected_payload(i) is the secure payload {HMAC, ciphertext} for M(i)||i,
// with HMAC = HMAC-SHA3-256 under K_MAC and ciphertext = AES-128 under K_AES, computed with an
// independent implementation of both algorithms.
package tb_vectors_pkg;
  localparam logic [127:0] K_AES = 128'h2b7e151628aed2a6abf7158809cf4f3c;
  localparam logic [127:0] K_MAC = 128'h000102030405060708090a0b0c0d0e0f;
  localparam int NVEC = 16;

  function automatic logic [63:0] msg_of(input int i);
    return 64'h0123456789ABCDEF ^ (64'(i) * 64'h1F2E3D4C5B6A7988);
  endfunction

  function automatic logic [383:0] expected_payload(input int i);
    case (i)
       0: return 384'h7cbd73bdd2abaf1eddfb0ebb1c078d07f72320b3686bece27f2fa435b7659d2d_1c637afb6fe7f151e785d538d212e9c5;
       1: return 384'hafccad9c193ee5b55bcf0260ca59ade9d0db2f552730578a7d555233384d8e73_752703188a8b31e3a43e9e05ddeb770c;
       2: return 384'hfb278d14c0b18aed4d63462793355e734378c8911c6dc223cbacdfe53fdff835_99c8e499fcb0c4b9a13e44b4216dbf5c;
       3: return 384'ha07dc4caf66aa574ebb64537ec99967bff340ffa8cdb05d19c2a080060b78b6c_73447c7e0f39b40c96e9ee63d7987e5b;
       4: return 384'hea5f8111daf0dc0fb933177c25f7219967581ccbc38fa7aeee70468d7edda4d1_0ecc37039517a30bf85147ed269125a9;
       5: return 384'h0d0f6f34c6d6330b10b72db8dc5d563a5757b4fb35ed2b04168b771f84b56f6a_7bd806b31fa58e3c8e7f00466da2c3f3;
       6: return 384'had3d6ed46b9fe7161015e0522d62e827c0d56238b65eefd32ed1f99f7ad797a8_7a15c24f55afcb4a8a1f59ba4df952ec;
       7: return 384'h433a4896e5c11ee73779566412d22a1ed863106581d0ce2d66e2addf53f8403a_54f3045b111cfdb51efbd38fa9a38104;
       8: return 384'h084ce069798439230fe8a6adc4502e0a43814a387fd3655a7c11ee36cea07ec9_d7ff78e67e1543f65ce0a7263da525b5;
       9: return 384'ha0cba7caad5847548e2425c70c8b2749e6450970ada2f766bbe66853665f9b6c_699b3637128458fc9223f0c2a9be8155;
      10: return 384'h694c008453e5445b15be3d686187dddf335449fecc89ba7723440a2703bce6e1_228506ba02d4a215701f3863e9958329;
      11: return 384'h3ff7b9e3804e7453f6cce7a40ad82483551f2ed55d7ffb0434fc7acb8f2a1240_493e2e5261ae318f57c30cdc690ff5d4;
      12: return 384'h50d958dbbbd58c9ec7249de794eb768b91cc69bc1534b82f38f2e4131a56737a_472496705451efc3ced1635625963983;
      13: return 384'hdba99b5af2db42c30ca7c5871c423bdcee8f9970d40bb28a1234e683f0208478_320e9502fea0dcbcadc7de6fc77b846e;
      14: return 384'h7b072153c4e6e8323ffae905147fac204c63808d3cb0bdb9b898c0d5ef340751_de1f6512369081e3693700c12eaaf1cd;
      15: return 384'h89b748471b84e613a545e382cc91fea656748e7e77acd3f8a22d00332afff27c_49e68dfb5020996da6af620cb97fa463;
      default: return '0;
    endcase
  endfunction
endpackage
