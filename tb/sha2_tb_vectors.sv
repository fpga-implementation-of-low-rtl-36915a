// sha2_tb_vectors: test messages and their expected digests.
//
// Message k has length MSG_LEN[k] bytes. Message 0 is "abc" (the standard's
// first example); every other message has bytes
//   m[i] = ((37*i + 101*k + 5) ^ (i >> 3)) mod 256.
// The digests were computed with an independent software SHA-2
// implementation from these same formulas.
package sha2_tb_vectors;

  import sha2_pkg::*;

  localparam int NMSG = 19;

  localparam int MSG_LEN [NMSG] = '{
    3, 1, 55, 56, 63, 64, 65, 119, 120, 200, 1000, 2, 111, 112, 127, 128, 129, 239, 240
  };

  function automatic logic [7:0] msg_byte(int k, int i);
    if (k == 0) return (i == 0) ? 8'h61 : (i == 1) ? 8'h62 : 8'h63;
    return 8'(((37*i + 101*k + 5) ^ (i >> 3)) & 255);
  endfunction

  // Bytes after padding: message, 0x80, zeros, length field; whole blocks.
  function automatic int padded_len(sha2_variant_e v, int len);
    int bb, lb;
    bb = block_bytes(v);
    lb = len_bytes(v);
    return ((len + 1 + lb + bb - 1) / bb) * bb;
  endfunction

  localparam logic [223:0] EXP224 [NMSG] = '{
      224'h23097d223405d8228642a477bda255b32aadbce4bda0b3f7e36c9da7, // len 3
      224'hfcd074cdd4c6e02b5dbe28f33858f8ed6d3e9e5ca5ff873f07371f3f, // len 1
      224'hafe66f230db7dca9353fcb1c42919759f15e0c403a669b1d4cf3afb2, // len 55
      224'h9cb4a1a8464c068aefd2d99312853c3cabd78974e83fe0a24bd213de, // len 56
      224'h2a2b6b534212bd4b2d6213959015d1208eaf019c5de4e8962ae42d01, // len 63
      224'hc20ae8e8d9005e6846743edb8370cfb9402b7a452b2f8230eaaffd65, // len 64
      224'h7dedf9428ff006edace8c92c9d499fc9559d6c0f891a06990c3568c9, // len 65
      224'h0cfb4ddccb7e579ed96d5bad070d9324600b29a1755cae153cb600ac, // len 119
      224'h40ce77495967967d28924f01d4f4cb4c5411dd4c4b41fc580dc30626, // len 120
      224'h314433f519fdd0b25a0dc50797ef96027fc4bd887605b62d0c38d491, // len 200
      224'hb91d6e45b374cf7f0cd2735ed02416a6b4152bdabe9090c5970f706d, // len 1000
      224'ha2f0ef39799ab19712a64fd487582787b2c5e216ec63fb8702a9ecae, // len 2
      224'h4e105fb242a17df7ad4e2b16ad43948fbcab038d9ba5360b02ca2c89, // len 111
      224'ha54a252f954d55825ee12817f5d99937ea67e2ffdb4bca19505f0d59, // len 112
      224'h7992e9573e2acbf0e5f811a1c8b757cf75a85327804d6bcbfc5bd343, // len 127
      224'h26c6220159adbf6749e47f9f4f70d418c52a9acb214f4adc8ace106d, // len 128
      224'h846b031b7d37fe3088852803c6dcbdb5ad191308cf1d72e04d5e0b9e, // len 129
      224'h1112fe2297c0afefd00e1ef12d508b52aeee5497fad0b8da11608605, // len 239
      224'he32bf8abf404d1ec4adc259f3de336591504a7afa7e0f221ad5076ae // len 240
  };

  localparam logic [255:0] EXP256 [NMSG] = '{
      256'hba7816bf8f01cfea414140de5dae2223b00361a396177a9cb410ff61f20015ad, // len 3
      256'h189f40034be7a199f1fa9891668ee3ab6049f82d38c68be70f596eab2e1857b7, // len 1
      256'h52b065a9c81d9557545fac4dedd0b7907fff88b6fff510d87b38e12d3bb9cfc4, // len 55
      256'h2f0d50ac4e7fb3dc44ca1ffc7dbf5688847af735ed76a894cd36ca02430373f6, // len 56
      256'h43df1a42deba2d85d7220fadd7f96d41e7f5321ea853b65b3257276ddfb631be, // len 63
      256'h88c3cfe8edb79db39ae768ce163a78a156f24d3faa2407d62014d70d14bbfa61, // len 64
      256'h9d45a4e4feeade16dda586b77dac999d4201c9c23bacec86862630b56a0d3df5, // len 65
      256'h0e668e54999d0ca8c6c7ebdcfc063623ed156d6d99ca7868398403bca59b4b75, // len 119
      256'h9266c2ab12ee8989ea25e71ec2767f025b49548b658edcc452f9c6bd178f2596, // len 120
      256'hc4242c9dd8b3ddefacb9e594c925d8866ba8ef0f541a13b50d75e45e0b0c4300, // len 200
      256'h62446ae4e65be519d02f77cc173478634240ced8a58b201faf4316c7f20592a9, // len 1000
      256'h2c602558ddeb5a512fbfcb4ca95c9517f981fdaac6167a1cad96d2216fc5ccef, // len 2
      256'h572973167bcce833aa59dbc99d9ce9907654b9d71556e575c251a7cba7ce35b9, // len 111
      256'h0373d1aaae6a730f863c06d6003a74196ba2c28dffcccdb01a59cdba4b607dc5, // len 112
      256'h517555412ee790e6c97adfc783bd43c2e70a63d88e0e28f28f0febcf3ebdf66d, // len 127
      256'hcdb80e2ae9610b8dd8397748f54240d3d0fa8c8aeb62647d4f17edc251e969bb, // len 128
      256'hd914b36d3668bd5fe24d1a43a0fb21326b2b5ebed23e1ab22b564afebcf7f71f, // len 129
      256'h50c6e4b0e2a67a72519598be2ce6945e7a7b794d4f1b115d32adca68cbcdd809, // len 239
      256'hee2d4b13fba0470221ada5ed737667aaf32b5389aedc137bb0037f4b56e08875 // len 240
  };

  localparam logic [383:0] EXP384 [NMSG] = '{
      384'hcb00753f45a35e8bb5a03d699ac65007272c32ab0eded1631a8b605a43ff5bed8086072ba1e7cc2358baeca134c825a7, // len 3
      384'h417316736caf4fc0f2a09f5d6e4c90d78b768fe08add82c5db9f0a22809bd6a719e3ad367f149d92b5455e952b79613b, // len 1
      384'h14bdb13a173696b72ce13a40b2ff9fa0b51ac2018ba0ef0c16354deda58d72f5c704e9ef92107ec743c4a2ae6e6eb44f, // len 55
      384'h9fefa722fecaa8edf719cbc821d9f6397228e8cbad948f12fd277995b7f6996265206770bea251af45c4f54f0edc0ca0, // len 56
      384'ha17409a26ee2aef3de57e66fca6d1ada0344da4041a39eb34c010e7e26195dccfb577310b348dd236d4578954228f166, // len 63
      384'hb100b42d24d36f8c1bb98ca89cfab9af9732bbde3cf66d20bd9728939a689c796e98a1ded4a7a1e257d21d23238fcc85, // len 64
      384'h531a4c91190a6c870c9785f9ba9dc8f02ce09173cc45b9d47c1f3aed59e16c53143edff3bc086faeb962bc3932d7c459, // len 65
      384'h1d6f9f98c00621a6e3b0da9c48a65ff15e767908a9722fee9312818ba7e6f00e52530364515b7bc18a4aff2aee41807c, // len 119
      384'hb49a1cb442d8c331495af9c852c652f333412a23255fa06697b23de9d8f3f6ad50a0a16b582a3abd13f494ec70d1b01b, // len 120
      384'h0a6895302775cdd4b30cdc27b3aad94ac644183c76fa4ba396fe7864bbfcabeaed4eb023e827fb31c59ce4dd3a849cc5, // len 200
      384'hf3ea43f53bd1d7f6d1a63047c3373dedcee72fa89824903adaca54f478ca4e9a784c614de938813a1bb5abde3d5ab13d, // len 1000
      384'h84095fd734c39a30ce7a012cf320dd9442a6fa1c21f2c7fe455ec1db88430bfdb95b78be68d8bbc7a97a21bb00272c1f, // len 2
      384'hdb91adb8f6e554dadf386fc01c5979b9001f8c58844413a03665f4aa24a7ec5460a2201456f1c88a9591f24ce4322291, // len 111
      384'h7d249c660ae7e86e08eb139a715eaf2ca79d65047fbdc00d4d3a1369e4db7a7ded192ca2eb3c55f2c0c292809d5d0c80, // len 112
      384'h2aee75627c56ce36235362cd600db55d5c04d6c85c4a3a4806580cf5b21135f1bed2cd02c8e52cea024d25f1feacbe6d, // len 127
      384'h179a76dff879c8465af6abaef80eb49cfb0161da9ccfb78707b5f635fcd97617de54435a654cb5c79889b90971adb09b, // len 128
      384'hd453b965ae5b28a463b92dd9e571e67ebd774ddecc40ba63cbed76ab882e0bce1b74e326664f65706a66cdfe03f177a4, // len 129
      384'h74f8efae9550f87c2d195992e75b1d42a2b1546fa5978e63c230ffa681f3e2903763093e49ee44bd6c022297ab4f2b8e, // len 239
      384'h5717622b8e510f2d13b0bc867589150ad47e5d90108e4a8e90a52ca9bd36d2b55c46a6393966ee86a2da16ab34d9bfce // len 240
  };

  localparam logic [511:0] EXP512 [NMSG] = '{
      512'hddaf35a193617abacc417349ae20413112e6fa4e89a97ea20a9eeee64b55d39a2192992a274fc1a836ba3c23a3feebbd454d4423643ce80e2a9ac94fa54ca49f, // len 3
      512'hfcd8780493d9d11d29031b928a9da358a6f48627fff0cb7e80fb8107de86e0c365dc9cf8fe2fc05a6ce6d75803b78ac894d82a396042312a995ef63b5dd4dd11, // len 1
      512'h86ca41ade2d769111e9921887ec9078832e8f21e29f9dc54609c1ad0937c99d19be759e8b2947da40eb022e1a3808cdc034f7f2611c9586c563864eec1512f34, // len 55
      512'h5eb0846134174ebe4f1cde1faf844c7a2c7cb32147a1993706248f271905d2cbf90e7a88394aa2658aeaaa08778f57a1cf9ab446768256cca4bb51fa5de3c37a, // len 56
      512'h5c4711c9b5170d8c9231409b54eb909825202be0647de144ac9ea78b8ae6bfe1a5ba16ef7e8f2f804861a6f5557e6da729240c98066a709a220682be3802085c, // len 63
      512'h06ff7069c29e560aa12136b95ca5abaf223d85c3ad4fc8bb9f4442357fb256aa759c86ed84274d4be306092a86251557ca4cd99d17338f7691fbb15a622bf88e, // len 64
      512'heb77e66be8f6a0a09114f68dd46764a0bcbb7ab9c7ae84f7a806b1837ef474c720ef57edfc07e3335c2882a8490d70a777f91853b6761170372f2f2245facdfb, // len 65
      512'he7ddcf0a46294d7c8a77ad98173f13a78e67d87e4f0086d83f6e436aa7e120de8e7f328060649e3ea78cd67b072ea533eed1eabf04f0a72023d47500a8bd035e, // len 119
      512'h33d1e29976852d23bcb25cf5986079d1d0dd41f29849141cbf642c7a89bb3cf2d23f165c7300b2c17fad8a673e9bf576febf5577882fb4184347df99080da924, // len 120
      512'h3d9d1d986ae6bd683cd7ff31ccefc6b30f574e64fe7f28f99580923e1f92b238dc3955234e433393760fccc98e85615bd623c6048c10d3673037d03618371276, // len 200
      512'h747677c2651283cd72e834f5b8eec749f7509e63f6e4f2560fa5ad1d532b87ad88813a9a1a1f5bb54078d20ee1481d3721b71188f21f2261d2d61e4b30a327d3, // len 1000
      512'h429d22019be6098df36ee686cfc1067db2f7cef3c70eff49c9e14319881027d737842437cfaaca3c9cf05ae1f17bad23a7c53ae6cde223404da78009fe88ecf9, // len 2
      512'hebd4720be9928010255104117f77d75028b5b7b77c6b80951b09fa627ad441f14d4ae1614e56cece78a28cf30d34e9a01bf24d5e36471aa4dcb25c9b2dbe4c10, // len 111
      512'h722e163f6282f9ef8653090407f21f14d681cb9611638907328cb9d5bbfa1e24b8c5c599cc0f03b43ddc7620e580cb3c89aba691014f19dd6c8fd00b4efc02c1, // len 112
      512'h713b4f0afed3c8b8033ac74cb3032c31002382011ba0c340cc7fd42b996c30639d8f4aec0ec62696c24a12b1367dcc06d0519cc7a41591b8e8b717712b544580, // len 127
      512'h70aaecbb586444efe833601355ae9985bdf5852d3be5599dcbb8bbe4d30cd8591087b92533e158e5fa40292c13ac0bd6c2afd5f273624b7aa701518a39b26754, // len 128
      512'h9049f3c8ba71006a31b1a0cba10ed1aa3ac320cefc13ee6efff8e3f63550e44b38e44222d60cd9880a24c5e7a0078580b78bfe4aada4010b61203e9b04263694, // len 129
      512'h7b00a198658934132ec001eecb7d4b92036b420cc8ab7a8c69d6b8bb54cc761b6d5ef7dded89d9e2aa750f5e3222cb535e849a3b8d85cbb89aef60e03e5b44e8, // len 239
      512'hd76d2b9c1570b4128c2571c294eb381470a58564d3ae0de49d3dc535102819731a4be42648a5aaf99e652b74492532b9b1989e653f5b44df23d35a6271b350d9 // len 240
  };

  // Expected digest, left-aligned in 512 bits.
  function automatic logic [511:0] expected(sha2_variant_e v, int k);
    case (v)
      SHA224:  return {EXP224[k], 288'd0};
      SHA256:  return {EXP256[k], 256'd0};
      SHA384:  return {EXP384[k], 128'd0};
      default: return EXP512[k];
    endcase
  endfunction

endpackage
